// spac_pkg: constants and helpers shared by the SPAC serial-link modules.
//
// SPAC is a Manchester-coded, half-duplex control link: one master sends
// frames of 9-bit words to up to 15 slaves and the addressed slave answers.
// A word is a data byte sent least significant bit first followed by a
// continue bit (1 = more words follow, 0 = this is the last word). A frame
// is: preamble word ($35, continue 1), address word {direction, address},
// sub-address word {R/W, sub-address}, zero or more data words, and the
// checksum word (continue 0).
//
// From the protocol description: 10 Mbit/s on a 40 MHz clock, preamble $35,
// 7-bit addresses and sub-addresses, one global and fifteen local broadcast
// addresses, 16-byte I2C FIFOs, at most 15 I2C data bytes, I2C clock from
// 2.5 MHz down to about 150 kHz, interrupt frame of about 1 us.
// Own choices (the protocol leaves them open): which addresses are the
// broadcast ones, which sub-addresses are the internal I2C registers, the
// checksum algorithm (sum of the bytes modulo 256) and the answer turnaround.
package spac_pkg;

  // 40 MHz system clock, 10 Mbit/s line rate.
  localparam int unsigned CLK_PER_BIT = 4;
  localparam int unsigned WORD_BITS   = 9;

  localparam logic [7:0] PREAMBLE = 8'h35;

  // Address map (own choice): $7F global broadcast, $70+g local broadcast
  // of group g (g = 0..14). Group 15 receives only the global broadcast.
  localparam logic [6:0] ADDR_GLOBAL     = 7'h7F;
  localparam logic [6:0] ADDR_LOCAL_BASE = 7'h70;

  // Direction bit of the address word, R/W bit of the sub-address word.
  localparam logic DIR_MASTER = 1'b1;
  localparam logic DIR_SLAVE  = 1'b0;
  localparam logic RW_READ    = 1'b1;
  localparam logic RW_WRITE   = 1'b0;

  // Internal sub-addresses of the slave (own choice): the I2C interface.
  localparam logic [6:0] SA_I2C_DATA = 7'h7C; // write: emission FIFO, read: reception FIFO
  localparam logic [6:0] SA_I2C_CFG  = 7'h7D; // [3:0] clock divider, [4] bus select
  localparam logic [6:0] SA_I2C_CMD  = 7'h7E; // byte 0: I2C address byte, byte 1: length (starts)
  localparam logic [6:0] SA_I2C_STAT = 7'h7F; // [0] busy [1] nack [2] tx empty [3] rx empty
  localparam logic [6:0] SA_INTERNAL_BASE = 7'h7C;

  // Interrupt frame: line held high for about 1 us.
  localparam int unsigned INTR_CYCLES = 40;

  // Gap between the end of a read request and the start of the answer:
  // nine bit periods (one word time), as read back from the measured
  // read/write transaction times.
  localparam int unsigned TURNAROUND_CYCLES = WORD_BITS * CLK_PER_BIT;

  // A request for one access to a slave-side resource (a byte of a board
  // register or memory block, or an internal register).
  typedef struct packed {
    logic        wr;    // 1 = write, 0 = read
    logic [6:0]  sub;   // sub-address
    logic [15:0] idx;   // byte number inside the resource
    logic [7:0]  wdata; // byte to write
  } acc_req_t;

  function automatic logic [7:0] chk_add(input logic [7:0] sum, input logic [7:0] b);
    return sum + b;
  endfunction

  function automatic logic addr_match(input logic [6:0] a, input logic [6:0] mine,
                                      input logic [3:0] group);
    return (a == mine) || (a == ADDR_GLOBAL) ||
           ((group != 4'hF) && (a == ADDR_LOCAL_BASE + 7'(group)));
  endfunction

endpackage
