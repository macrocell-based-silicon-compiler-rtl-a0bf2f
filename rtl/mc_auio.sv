// mc_auio: arithmetic unit with I/O ports of one macrocell processor.
//
// Bit-parallel, single-accumulator data path. Memory data enters through the
// register MOR. A 2:1 mux picks MOR or SOR as the input of an arithmetic
// right barrel shifter (0-7 bits) whose result is registered in SOR; taking
// SOR again lets a shift continue over several cycles. SOR passes a
// complementor and a 2:1 mux (value or 0) to adder input A; a 3:1 mux gives
// adder input B (0, MOR or MBUS). The saturating adder loads ACC. ACC drives
// MBUS, the internal bus to the I/O circuits, to the B mux and to MIR, the
// memory input register.
//
// Multiplies are microcoded:
//  * variable coefficient k arriving bit-serially, MSB first, on COEF:
//    kA = -A + ~k[n-1]*A + k[n-2]*A/2 + ..., one partial product per clock,
//    the coefficient bit (inverted for the sign bit) gating the A mux;
//  * fixed coefficient: canonical signed-digit terms built by sequencing the
//    shift depth and the complementor.
// Divide: each step adds or subtracts the shifted divisor in SOR depending on
// the sign of ACC (COMP_DIV); the quotient bit q = (ACC >= 0) leaves on a
// serial port. Sent as ~q1, q2 .. qn and a final 1, the serial quotient is in
// two's complement form.
//
// MIR is the document's transparent latch: here a register (mir_ld) plus a
// bypass. A write with mir_tr set takes MBUS in the same cycle (transparent);
// otherwise it writes the value MIR holds, possibly cycles later, when the
// memory is free. This keeps the design free of latches.
//
// I/O: N_SIN serial-parallel converters and N_SOUT parallel-serial converters
// (MSB first, one bit per clock under microcode control), N_COEF raw serial
// coefficient inputs, and the parallel signal data bus (channel number from
// the address field; the bus strobes and channel are decoded straight from
// the control word, without a register). All registers are rising-edge,
// reset synchronous. The data path arrangement follows the document's
// data-path figure; the control encoding, the MBUS sources and the port
// protocol are this design's own.
module mc_auio #(
  parameter int unsigned W      = 16,
  parameter int unsigned N_SIN  = 2,
  parameter int unsigned N_SOUT = 2,
  parameter int unsigned N_COEF = 2,
  localparam int unsigned AW    = mc_pkg::ADDR_W
) (
  input  logic                 clk,
  input  logic                 rst,
  input  mc_pkg::ctrl_t        cw,
  // data memory
  input  logic [W-1:0]         mem_rdata,
  output logic                 mem_we,
  output logic [W-1:0]         mem_wdata,
  input  logic                 cw_en,      // FSM condition for MEM_CWR
  output logic [2:0]           cond,       // {saturated, ACC==0, ACC<0}
  // serial ports
  input  logic [N_COEF-1:0]    coef,
  input  logic [N_SIN-1:0]     sin,
  output logic [N_SIN-1:0]     sin_req,    // converter shifts this cycle
  output logic [N_SOUT-1:0]    sout,
  output logic [N_SOUT-1:0]    sout_vld,   // a bit is sent this cycle
  // signal data bus
  input  logic [W-1:0]         sig_din,
  output logic [W-1:0]         sig_dout,
  output logic                 sig_oe,
  output logic                 sig_rd,
  output logic [AW-1:0]        sig_chan,
  // observation
  output logic [W-1:0]         acc_q
);
  import mc_pkg::*;

  logic signed [W-1:0] mor, sor, acc, mir;
  logic                sat_q;
  logic signed [W-1:0] shin, shout, mbus, bval;
  logic signed [W:0]   aval, sum;
  logic                comp_do, gate, cin, ovf;
  logic signed [W-1:0] sum_sat;
  logic [W-1:0]        sipo [N_SIN];
  logic [W-1:0]        piso [N_SOUT];
  logic                qbit;

  // shifter path
  assign shin  = cw.shsrc ? sor : mor;
  assign shout = shin >>> cw.shift;

  // MBUS
  always_comb begin
    unique case (cw.mbus)
      MB_MOR:  mbus = mor;
      MB_SIN:  mbus = (32'(cw.port) < N_SIN) ? signed'(sipo[cw.port]) : '0;
      MB_SIG:  mbus = signed'(sig_din);
      default: mbus = acc;
    endcase
  end

  // adder A side: complementor, then value-or-zero mux
  always_comb begin
    comp_do = (cw.comp == COMP_ON) || (cw.comp == COMP_DIV && !acc[W-1]);
    unique case (cw.amux)
      A_SHIFT: gate = 1'b1;
      A_COEF0: gate = coef[0] ^ cw.coef_inv;
      A_COEF1: gate = (N_COEF > 1) ? (coef[N_COEF-1] ^ cw.coef_inv) : 1'b0;
      default: gate = 1'b0;
    endcase
    aval = gate ? (comp_do ? ~{sor[W-1], sor} : {sor[W-1], sor}) : '0;
    cin  = gate && comp_do;
    unique case (cw.bmux)
      B_MOR:   bval = mor;
      B_MBUS:  bval = mbus;
      default: bval = '0;
    endcase
    sum = {bval[W-1], bval} + aval + (W+1)'(cin);
    ovf = sum[W] != sum[W-1];
    if (!ovf)        sum_sat = sum[W-1:0];
    else if (sum[W]) sum_sat = {1'b1, {(W-1){1'b0}}};
    else             sum_sat = {1'b0, {(W-1){1'b1}}};
  end

  // serial quotient bit: q = ACC >= 0, first bit inverted, final 1
  always_comb begin
    unique case (cw.quot)
      Q_FIRST: qbit = acc[W-1];
      Q_BIT:   qbit = !acc[W-1];
      Q_ONE:   qbit = 1'b1;
      default: qbit = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      mor   <= '0;
      sor   <= '0;
      acc   <= '0;
      mir   <= '0;
      sat_q <= 1'b0;
    end else begin
      if (cw.mem == MEM_RD) mor <= signed'(mem_rdata);
      if (cw.sor_ld)        sor <= shout;
      if (cw.acc_ld) begin
        acc   <= sum_sat;
        sat_q <= ovf;
      end
      if (cw.mir_ld)        mir <= mbus;
    end
  end

  // memory write through MIR (held) or straight from MBUS (transparent)
  assign mem_we    = (cw.mem == MEM_WR) || (cw.mem == MEM_CWR && cw_en);
  assign mem_wdata = cw.mir_tr ? mbus : mir;

  // serial-parallel converters
  for (genvar p = 0; p < N_SIN; p++) begin : g_sin
    assign sin_req[p] = cw.si_sh && (32'(cw.port) == p);
    always_ff @(posedge clk) begin
      if (rst)             sipo[p] <= '0;
      else if (sin_req[p]) sipo[p] <= {sipo[p][W-2:0], sin[p]};
    end
  end

  // parallel-serial converters; a port also carries the serial quotient
  for (genvar p = 0; p < N_SOUT; p++) begin : g_sout
    logic sel;
    assign sel = (32'(cw.port) == p);
    always_ff @(posedge clk) begin
      if (rst)                    piso[p] <= '0;
      else if (cw.so_ld && sel)   piso[p] <= mbus;
      else if (cw.so_sh && sel)   piso[p] <= {piso[p][W-2:0], 1'b0};
    end
    assign sout[p]     = (cw.quot != Q_NONE && sel) ? qbit : piso[p][W-1];
    assign sout_vld[p] = sel && (cw.so_sh || cw.quot != Q_NONE);
  end

  assign sig_dout = mbus;
  assign sig_oe   = cw.sig_wr;
  assign sig_rd   = cw.sig_rd;
  assign sig_chan = cw.addr;
  assign cond     = {sat_q, acc == '0, acc[W-1]};
  assign acc_q    = acc;
endmodule
