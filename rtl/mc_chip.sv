// mc_chip: four-processor signal processing IC.
//
// Four microprogrammed processors and a host interface. Processor 1 owns the
// parallel signal data bus, over which sampled-data inputs and outputs are
// exchanged each sample (several channels per sample). The host
// microprocessor reaches the chip through the host interface, which buffers
// one block per frame and interrupts the host once per frame. Processors talk
// to each other only over bit-serial links:
//   P1 -> P2, P2 -> P1, P2 -> P3, P3 -> host interface,
//   host interface -> P4, P4 -> P1 (serial input 1 and coefficient input 0)
// P4's second serial input is the chip input 'ext_sin'; serial inputs with no
// link are tied low. All processors and the host interface share the clock,
// the synchronous active-high reset and the sample strobe, which must come at
// least every 109 clocks for the default microprograms (mc_prog_pkg). The
// link topology follows the document's four-processor organisation; the
// microprograms are a demonstration of this design's own. Each processor
// is built with only the optional macrocells its default program needs: an
// AAU with IX and IY (no pointer register) in P3, an FSM in P2, and
// serial converters only for the links each processor has. Programs
// passed in through PROG1..PROG4 must keep to the same resources.
module mc_chip #(
  parameter int unsigned W         = 16,
  parameter int unsigned FRAME     = 8,
  parameter mc_prog_pkg::prog_t PROG1 = mc_prog_pkg::prog_p1(),
  parameter mc_prog_pkg::prog_t PROG2 = mc_prog_pkg::prog_p2(),
  parameter mc_prog_pkg::prog_t PROG3 = mc_prog_pkg::prog_p3(),
  parameter mc_prog_pkg::prog_t PROG4 = mc_prog_pkg::prog_p4(),
  localparam int unsigned AW  = mc_pkg::ADDR_W,
  localparam int unsigned HAW = $clog2(2 * FRAME) + 1
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           sample,
  // signal data bus (processor 1)
  input  logic [W-1:0]   sig_din,
  output logic [W-1:0]   sig_dout,
  output logic           sig_oe,
  output logic           sig_rd,
  output logic [AW-1:0]  sig_chan,
  // host data bus
  input  logic           h_cs,
  input  logic           h_we,
  input  logic [HAW-1:0] h_addr,
  input  logic [W-1:0]   h_wdata,
  output logic [W-1:0]   h_rdata,
  output logic           irq,
  // spare bit-serial input of processor 4
  input  logic           ext_sin,
  output logic [3:0]     busy,
  output logic [3:0]     overrun
);
  import mc_prog_pkg::*;

  logic [1:0] coef [4];
  logic [W-1:0] dout [4];
  logic [3:0]   oe, rd;
  logic [AW-1:0] chan [4];
  logic hi_tx_bit;

  // serial network; each processor has converters only for its own links
  logic [1:0] p1_sin, p1_sreq;                // P2 on port 0, P4 on port 1
  logic       p1_sout, p1_svld;               // to P2
  logic       p2_sin, p2_sreq;                // from P1
  logic [1:0] p2_sout, p2_svld;               // to P1 (port 0), to P3 (port 1)
  logic       p3_sin, p3_sreq;                // from P2
  logic       p3_sout, p3_svld;               // to the host interface
  logic [1:0] p4_sin, p4_sreq;                // host interface on port 0, ext_sin on port 1
  logic [1:0] p4_sout, p4_svld;               // to P1 (coefficient 0 and port 1)

  assign p1_sin  = {p4_sout[1], p2_sout[0]};
  assign coef[0] = {1'b0, p4_sout[0]};
  assign p2_sin  = p1_sout;
  assign coef[1] = {1'b0, p1_sout};
  assign p3_sin  = p2_sout[1];
  assign coef[2] = {1'b0, p2_sout[1]};
  assign p4_sin  = {ext_sin, hi_tx_bit};
  assign coef[3] = {ext_sin, hi_tx_bit};

  mc_processor #(.W(W), .MAIN_LEN(P1_MAIN), .N_ITER(0), .PROGRAM(PROG1), .N_SIN(2), .N_SOUT(1),
                 .HAS_AAU(1'b0), .HAS_FSM(1'b0)) u_p1 (
    .clk, .rst, .sample, .coef(coef[0]), .sin(p1_sin), .sin_req(p1_sreq), .sout(p1_sout), .sout_vld(p1_svld),
    .sig_din, .sig_dout(dout[0]), .sig_oe(oe[0]), .sig_rd(rd[0]), .sig_chan(chan[0]),
    .busy(busy[0]), .overrun(overrun[0]));

  mc_processor #(.W(W), .MAIN_LEN(P2_MAIN), .N_ITER(0), .PROGRAM(PROG2), .N_SIN(1), .N_SOUT(2),
                 .HAS_AAU(1'b0), .HAS_FSM(1'b1)) u_p2 (
    .clk, .rst, .sample, .coef(coef[1]), .sin(p2_sin), .sin_req(p2_sreq), .sout(p2_sout), .sout_vld(p2_svld),
    .sig_din('0), .sig_dout(dout[1]), .sig_oe(oe[1]), .sig_rd(rd[1]), .sig_chan(chan[1]),
    .busy(busy[1]), .overrun(overrun[1]));

  mc_processor #(.W(W), .MAIN_LEN(P3_MAIN), .SUB_LEN(P3_SUB), .N_ITER(P3_ITER), .PROGRAM(PROG3), .N_SIN(1), .N_SOUT(1),
                 .IY_MOD(4), .RO_MASK(64'(1) << P3_DIV), .CONSTS(p3_consts()), .HAS_AAU(1'b1), .AAU_PTR(1'b0), .HAS_FSM(1'b0)) u_p3 (
    .clk, .rst, .sample, .coef(coef[2]), .sin(p3_sin), .sin_req(p3_sreq), .sout(p3_sout), .sout_vld(p3_svld),
    .sig_din('0), .sig_dout(dout[2]), .sig_oe(oe[2]), .sig_rd(rd[2]), .sig_chan(chan[2]),
    .busy(busy[2]), .overrun(overrun[2]));

  mc_processor #(.W(W), .MAIN_LEN(P4_MAIN), .N_ITER(0), .PROGRAM(PROG4), .N_SIN(2), .N_SOUT(2),
                 .HAS_AAU(1'b0), .HAS_FSM(1'b0)) u_p4 (
    .clk, .rst, .sample, .coef(coef[3]), .sin(p4_sin), .sin_req(p4_sreq), .sout(p4_sout), .sout_vld(p4_svld),
    .sig_din('0), .sig_dout(dout[3]), .sig_oe(oe[3]), .sig_rd(rd[3]), .sig_chan(chan[3]),
    .busy(busy[3]), .overrun(overrun[3]));

  mc_host_if #(.W(W), .FRAME(FRAME), .IN_WORDS(FRAME), .OUT_WORDS(2 * FRAME)) u_hif (
    .clk, .rst, .sample, .tx_bit(hi_tx_bit), .tx_req(p4_sreq[0]), .rx_bit(p3_sout), .rx_vld(p3_svld),
    .h_cs, .h_we, .h_addr, .h_wdata, .h_rdata, .irq);

  // only processor 1 is on the signal data bus
  assign sig_dout = dout[0];
  assign sig_oe   = oe[0];
  assign sig_rd   = rd[0];
  assign sig_chan = chan[0];
endmodule
