// i2c_dev_model: behavioural I2C memory device for the testbenches.
//
// Answers at the 7-bit address ADDR. In a write, the first data byte sets
// the internal pointer and the following bytes are stored at the pointer,
// which then advances; a read returns bytes from the pointer onwards
// until the master does not acknowledge. SDA is open drain: sda_oe = 1
// pulls it low. Counts the bytes written and read.
// With HAS_PTR = 0 the device has no pointer byte: every transfer starts
// at location 0 and all data bytes are stored or read from there on.
module i2c_dev_model #(
  parameter logic [6:0] ADDR = 7'h50,
  parameter bit HAS_PTR = 1'b1
) (
  input  logic scl,
  input  logic sda,
  output logic sda_oe
);
  typedef enum {D_IDLE, D_ADR, D_WR, D_RD} st_t;
  st_t st = D_IDLE, st_next = D_IDLE;
  logic [7:0] mem [256];
  logic [7:0] sh = 0;
  logic [7:0] ptr = 0;
  int bitc = 0;
  bit ack_phase = 0, first = 0, rd_nack = 0, from_adr = 0;
  int nstart = 0, nwr = 0, nrd = 0;

  initial begin
    sda_oe = 0;
    foreach (mem[i]) mem[i] = 8'(i * 7 + 3);
  end

  always @(negedge sda) if (scl) begin
    st = D_ADR; bitc = 0; sda_oe = 0; ack_phase = 0; nstart++;
    if (!HAS_PTR) ptr = 0;
  end
  always @(posedge sda) if (scl) begin
    st = D_IDLE; sda_oe = 0; ack_phase = 0;
  end

  always @(posedge scl) begin
    if (st != D_IDLE) begin
      if (!ack_phase) begin
        if (st == D_ADR || st == D_WR) sh = {sh[6:0], sda};
        bitc++;
      end else if (st == D_RD) rd_nack = sda;
    end
  end

  always @(negedge scl) begin
    if (st == D_IDLE) ;
    else if (!ack_phase && bitc == 8) begin
      ack_phase = 1;
      case (st)
        D_ADR: if (sh[7:1] == ADDR) begin
          sda_oe = 1; st_next = sh[0] ? D_RD : D_WR; first = 1;
        end else st = D_IDLE;
        D_WR: begin
          sda_oe = 1;
          if (first && HAS_PTR) ptr = sh;
          else begin mem[ptr] = sh; ptr++; nwr++; end
          first = 0;
        end
        default: sda_oe = 0;   // read: master acknowledges
      endcase
    end else if (ack_phase) begin
      ack_phase = 0; bitc = 0;
      from_adr = (st == D_ADR);
      if (st == D_ADR) st = st_next;
      if (st == D_RD) begin
        if (from_adr || !rd_nack) begin
          sh = mem[ptr]; ptr++; nrd++;
          sda_oe = ~sh[7];
        end else begin
          sda_oe = 0; st = D_IDLE;
        end
      end else sda_oe = 0;
    end else if (st == D_RD) begin
      sda_oe = ~sh[7 - bitc];
    end
  end
endmodule
