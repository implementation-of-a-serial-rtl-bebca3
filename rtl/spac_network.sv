// spac_network: one SPAC control network - a master and NSLAVES slaves.
//
// The master sits away from the detector; the slaves, one per front-end
// board, share a copper bus in the front-end crate. The link between the
// two (optical fibres and the controller board that converts them to the
// electrical bus) is outside this design, so the master's lines (mst_*)
// and the bus lines (bus_*) are separate ports: connect mst_ms* to bus_ms*
// and bus_sm* to mst_sm* for a direct link.
// On the bus the two downstream lines MS1/MS2 reach every slave. Upstream,
// a slave that is not answering keeps its lines low (idle), so the bus
// lines are modelled as the OR of all slaves' outputs; several slaves
// sending an interrupt frame at once therefore still give one clean
// interrupt frame.
// One master and 15 slaves per network follow the protocol description;
// the wired-OR model of the bus and the port layout are this design's.
// Each slave's configuration pins (address, broadcast group, interrupt
// enable), its parallel interface and its two I2C buses are ports.
module spac_network
  import spac_pkg::*;
#(
  parameter int unsigned NSLAVES = 15
) (
  input  logic        clk,
  input  logic        rst_n,
  // master command side
  input  logic        cmd_valid,
  output logic        cmd_ready,
  input  logic        cmd_rnw,
  input  logic [6:0]  cmd_addr,
  input  logic [6:0]  cmd_sub,
  input  logic [15:0] cmd_len,
  input  logic        ms_sel,
  input  logic        sm_sel,
  input  logic        wd_valid,
  input  logic [7:0]  wd_data,
  output logic        wd_ready,
  output logic        rd_valid,
  output logic [7:0]  rd_data,
  output logic        done,
  output logic        ok,
  output logic        intr,
  // master side of the link
  output logic        mst_ms1,
  output logic        mst_ms2,
  input  logic        mst_sm1,
  input  logic        mst_sm2,
  // crate side of the link (the copper bus)
  input  logic        bus_ms1,
  input  logic        bus_ms2,
  output logic        bus_sm1,
  output logic        bus_sm2,
  // per-slave configuration pins
  input  logic [6:0]  slave_addr  [NSLAVES],
  input  logic [3:0]  bcast_group [NSLAVES],
  input  logic        intr_en     [NSLAVES],
  // per-slave parallel interface
  output logic [6:0]  pi_addr  [NSLAVES],
  output logic [15:0] pi_idx   [NSLAVES],
  output logic [7:0]  pi_wdata [NSLAVES],
  output logic        pi_wr    [NSLAVES],
  output logic        pi_rd    [NSLAVES],
  input  logic [7:0]  pi_rdata [NSLAVES],
  // per-slave I2C buses
  output logic [1:0]  scl_oe [NSLAVES],
  output logic [1:0]  sda_oe [NSLAVES],
  input  logic [1:0]  sda_i  [NSLAVES],
  // per-slave status
  output logic        line_sel  [NSLAVES],
  output logic        frame_err [NSLAVES]
);
  logic [NSLAVES-1:0] sm1_v, sm2_v;

  spac_master u_master (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_rnw, .cmd_addr, .cmd_sub, .cmd_len,
    .ms_sel, .sm_sel, .wd_valid, .wd_data, .wd_ready, .rd_valid, .rd_data, .done, .ok, .intr,
    .ms1(mst_ms1), .ms2(mst_ms2), .sm1(mst_sm1), .sm2(mst_sm2));

  for (genvar s = 0; s < NSLAVES; s++) begin : g_slave
    spac_slave u_slave (
      .clk, .rst_n,
      .slave_addr(slave_addr[s]), .bcast_group(bcast_group[s]), .intr_en(intr_en[s]),
      .ms1(bus_ms1), .ms2(bus_ms2), .sm1(sm1_v[s]), .sm2(sm2_v[s]),
      .pi_addr(pi_addr[s]), .pi_idx(pi_idx[s]), .pi_wdata(pi_wdata[s]),
      .pi_wr(pi_wr[s]), .pi_rd(pi_rd[s]), .pi_rdata(pi_rdata[s]),
      .scl_oe(scl_oe[s]), .sda_oe(sda_oe[s]), .sda_i(sda_i[s]),
      .line_sel(line_sel[s]), .frame_err(frame_err[s]));
  end

  assign bus_sm1 = |sm1_v;
  assign bus_sm2 = |sm2_v;

endmodule
