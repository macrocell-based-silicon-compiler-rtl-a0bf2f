// tb_wl_audio_eq: audio-equalizer workload on a single processor at the
// equalizer's rate of 100 clocks per sample (50 kHz at a 5 MHz clock).
//
// The program cascades four identical second-order sections. The section is
// written once as a 22-word subprogram and run four times, its state words
// indexed by IX, so repeated code is multiplexed onto one piece of
// microcode. Coefficients are fixed and embedded in the microcode as
// signed-digit shift/sign sequences:
//   y = 0.5x - 0.75x1 + 0.375x2 + 0.875y1 - 0.5625y2
//     = x/2 - x1 + x1/4 + x2/2 - x2/8 + y1 - y1/8 - y2/2 - y2/16
// The main program (3 words) outputs the previous sample's result on signal
// channel 1 and takes x from channel 0. The section coefficients are this
// test's own; the equalizer's real coefficients are not known. Expected
// outputs come from a model of the same saturating add sequence in this file,
// loosely checked against a floating-point filter.
module tb_wl_audio_eq;
  import mc_pkg::*;
  localparam int W = 16, NS = 200, PERIOD = 100, MAIN = 3, SUB = 22, NSEC = 4;
  localparam int S = 1, X1 = 8, X2 = 12, Y1 = 16, Y2 = 20;
  typedef logic [255:0][CW_W-1:0] img_t;

  function automatic ctrl_t eq_word(input int i);
    ctrl_t c = CW_NOP;
    int s;
    if (i == 0) begin c.mem = MEM_RD; c.addr = 6'(S); end
    if (i == 1) begin c.mbus = MB_MOR; c.sig_wr = 1'b1; c.addr = 6'd1; end
    if (i == 2) begin c.sig_rd = 1'b1; c.mbus = MB_SIG; c.mir_tr = 1'b1; c.mem = MEM_WR; c.addr = 6'(S); end
    s = i - MAIN;
    // SOR loads (source MOR) with shift depths
    if (s == 1)  begin c.sor_ld = 1'b1; c.shift = 3'd1; end
    if (s == 2)  begin c.sor_ld = 1'b1; c.shift = 3'd0; end
    if (s == 3)  begin c.sor_ld = 1'b1; c.shift = 3'd2; end
    if (s == 5)  begin c.sor_ld = 1'b1; c.shift = 3'd1; end
    if (s == 6)  begin c.sor_ld = 1'b1; c.shift = 3'd3; end
    if (s == 8)  begin c.sor_ld = 1'b1; c.shift = 3'd0; end
    if (s == 9)  begin c.sor_ld = 1'b1; c.shift = 3'd3; end
    if (s == 11) begin c.sor_ld = 1'b1; c.shift = 3'd1; end
    if (s == 12) begin c.sor_ld = 1'b1; c.shift = 3'd4; end
    // adds: s2 starts the sum, then +/- SOR
    if (s == 2) begin c.amux = A_SHIFT; c.acc_ld = 1'b1; end
    if (s == 3 || s == 4 || s == 6 || s == 7 || s == 9 || s == 10 || s == 12 || s == 13) begin
      c.amux = A_SHIFT; c.bmux = B_MBUS; c.acc_ld = 1'b1;
      c.comp = (s == 3 || s == 7 || s == 10 || s == 12 || s == 13) ? COMP_ON : COMP_OFF;
    end
    // memory reads
    if (s == 0)  begin c.mem = MEM_RD; c.addr = 6'(S); end
    if (s == 1)  begin c.mem = MEM_RD; c.addr = 6'(X1); c.amode = AM_IX; end
    if (s == 4)  begin c.mem = MEM_RD; c.addr = 6'(X2); c.amode = AM_IX; end
    if (s == 7)  begin c.mem = MEM_RD; c.addr = 6'(Y1); c.amode = AM_IX; end
    if (s == 10) begin c.mem = MEM_RD; c.addr = 6'(Y2); c.amode = AM_IX; end
    // state update: x2 <= x1, x1 <= x, y2 <= y1, y1 <= y, S <= y
    if (s == 14) begin c.mem = MEM_RD; c.addr = 6'(X1); c.amode = AM_IX; c.mbus = MB_ACC; c.mir_ld = 1'b1; end
    if (s == 15) begin c.mbus = MB_MOR; c.mir_tr = 1'b1; c.mem = MEM_WR; c.addr = 6'(X2); c.amode = AM_IX; end
    if (s == 16) begin c.mem = MEM_RD; c.addr = 6'(S); end
    if (s == 17) begin c.mbus = MB_MOR; c.mir_tr = 1'b1; c.mem = MEM_WR; c.addr = 6'(X1); c.amode = AM_IX; end
    if (s == 18) begin c.mem = MEM_RD; c.addr = 6'(Y1); c.amode = AM_IX; end
    if (s == 19) begin c.mbus = MB_MOR; c.mir_tr = 1'b1; c.mem = MEM_WR; c.addr = 6'(Y2); c.amode = AM_IX; end
    if (s == 20) begin c.mem = MEM_WR; c.addr = 6'(Y1); c.amode = AM_IX; end
    if (s == 21) begin c.mem = MEM_WR; c.addr = 6'(S); end
    return c;
  endfunction
  function automatic img_t eq_prog();
    img_t p;
    for (int i = 0; i < 256; i++) p[i] = eq_word(i);
    return p;
  endfunction

  logic clk = 0, rst = 1, sample = 0;
  logic [1:0] sin_req, sout, sout_vld;
  logic [W-1:0] sig_din = '0, sig_dout;
  logic sig_oe, sig_rd, busy, overrun;
  logic [ADDR_W-1:0] sig_chan;
  int checks = 0, failures = 0;

  mc_processor #(.W(W), .MAIN_LEN(MAIN), .SUB_LEN(SUB), .N_ITER(NSEC), .PROGRAM(eq_prog()), .HAS_FSM(1'b0)) dut (
    .clk, .rst, .sample, .coef(2'b00), .sin(2'b00), .sin_req, .sout, .sout_vld, .sig_din,
    .sig_dout, .sig_oe, .sig_rd, .sig_chan, .busy, .overrun);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask
  function automatic logic signed [W-1:0] sat(input longint v);
    return (v > 32767) ? 16'sh7fff : (v < -32768) ? 16'sh8000 : W'(v);
  endfunction
  function automatic logic signed [W-1:0] addsat(input logic signed [W-1:0] a, input logic signed [W-1:0] b);
    return sat(longint'(a) + longint'(b));
  endfunction

  logic signed [W-1:0] x [NS], y_m [NS], y_d [NS + 1];
  real y_f [NS];
  bit got [NS + 1];
  int cur = 0, busy_len = 0, max_busy = 0, n_sat = 0;
  always @(posedge clk) if (!rst) begin
    if (sig_oe && sig_chan == 6'd1) begin y_d[cur] = signed'(sig_dout); got[cur] = 1; end
    if (busy) busy_len++;
    else begin if (busy_len > max_busy) max_busy = busy_len; busy_len = 0; end
    if (dut.cw.acc_ld && dut.u_auio.ovf) n_sat++;
  end

  initial begin
    logic signed [W-1:0] sx1 [NSEC], sx2 [NSEC], sy1 [NSEC], sy2 [NSEC], v, a;
    real fx1 [NSEC], fx2 [NSEC], fy1 [NSEC], fy2 [NSEC], fv, fa;
    // model: fixed-point and floating-point
    for (int k = 0; k < NSEC; k++) begin sx1[k] = 0; sx2[k] = 0; sy1[k] = 0; sy2[k] = 0; fx1[k] = 0; fx2[k] = 0; fy1[k] = 0; fy2[k] = 0; end
    for (int n = 0; n < NS; n++) begin
      x[n] = W'(int'(9000.0 * $sin(0.21 * n) + 5000.0 * $sin(1.7 * n)) + $urandom_range(0, 200) - 100);
      v = x[n]; fv = real'(x[n]);
      for (int k = 0; k < NSEC; k++) begin
        a = sat(longint'(v >>> 1));
        a = addsat(a, -sx1[k]);        a = addsat(a, sx1[k] >>> 2);
        a = addsat(a, sx2[k] >>> 1);   a = addsat(a, -(sx2[k] >>> 3));
        a = addsat(a, sy1[k]);         a = addsat(a, -(sy1[k] >>> 3));
        a = addsat(a, -(sy2[k] >>> 1)); a = addsat(a, -(sy2[k] >>> 4));
        sx2[k] = sx1[k]; sx1[k] = v; sy2[k] = sy1[k]; sy1[k] = a; v = a;
        fa = 0.5 * fv - 0.75 * fx1[k] + 0.375 * fx2[k] + 0.875 * fy1[k] - 0.5625 * fy2[k];
        fx2[k] = fx1[k]; fx1[k] = fv; fy2[k] = fy1[k]; fy1[k] = fa; fv = fa;
      end
      y_m[n] = v; y_f[n] = fv;
    end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n <= NS; n++) begin
      cur = n; if (n < NS) sig_din = x[n];
      sample = 1; @(negedge clk); sample = 0;
      repeat (PERIOD - 1) @(negedge clk);
    end
    check(!overrun, "program fits 100 clocks per sample");
    check(max_busy == MAIN + SUB * NSEC, $sformatf("program length %0d", max_busy));
    check(max_busy < PERIOD, "program shorter than the sample interval");
    check(got[0] && y_d[0] == 0, "first output is the reset state");
    for (int n = 0; n < NS; n++) begin
      check(got[n + 1] && y_d[n + 1] == y_m[n], $sformatf("y[%0d] = %h want %h", n, y_d[n + 1], y_m[n]));
      check(real'(y_m[n]) - y_f[n] < 200.0 && y_f[n] - real'(y_m[n]) < 200.0, $sformatf("fixed vs float %0d: %0d %f", n, y_m[n], y_f[n]));
    end
    $display("audio equalizer: %0d samples, %0d clocks per sample used of %0d, saturations %0d", NS, max_busy, PERIOD, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat ((NS + 3) * PERIOD + 500) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
