// tb_wl_dfe: decision-feedback-equalizer workload on two processors at the
// DFE's rate of 43 clocks per sample (116 kHz at a 5 MHz clock).
//
// Processor 1 owns the signal bus. It reads the received sample x, forms the
// feed-forward part f = 0.75x - 0.25x1 by signed-digit adds and sends f
// bit-serially to processor 2. Processor 2 subtracts the feedback
// 0.375*a1 (a1 = previous decision, +-0.5) and decides on the sign of the
// result with its FSM: two conditional writes store +0.5 or -0.5, both
// read-only constants, as the new decision. It sends the decision back
// bit-serially in the first 16 clocks of the next sample, and processor 1
// puts it on signal channel 1. The tap values and the one-sample output
// latency are this test's own choices; the document gives only the DFE's
// processor count and rate. Expected decisions come from a model in this
// file.
module tb_wl_dfe;
  import mc_pkg::*;
  localparam int W = 16, NS = 300, PERIOD = 43, M1 = 24, M2 = 34;
  localparam int PLUS = 10, MINUS = 11;
  typedef logic [255:0][CW_W-1:0] img_t;

  function automatic ctrl_t p1_word(input int i);
    ctrl_t c = CW_NOP;
    if (i <= 15) c.si_sh = 1'b1;                                  // decision from P2
    if (i >= 8 && i <= 23) c.so_sh = 1'b1;                        // f to P2
    if (i == 0) begin c.sig_rd = 1'b1; c.mbus = MB_SIG; c.mir_tr = 1'b1; c.mem = MEM_WR; end
    if (i == 1 || i == 6) c.mem = MEM_RD;                         // x
    if (i == 2) c.sor_ld = 1'b1;
    if (i == 3) begin c.amux = A_SHIFT; c.acc_ld = 1'b1; c.sor_ld = 1'b1; c.shift = 3'd2; c.mem = MEM_RD; c.addr = 6'd1; end
    if (i == 4 || i == 6) begin c.amux = A_SHIFT; c.comp = COMP_ON; c.bmux = B_MBUS; c.acc_ld = 1'b1; end
    if (i == 5) begin c.sor_ld = 1'b1; c.shift = 3'd2; end
    if (i == 7) begin c.mbus = MB_ACC; c.so_ld = 1'b1; end
    if (i == 8) begin c.mbus = MB_MOR; c.mir_tr = 1'b1; c.mem = MEM_WR; c.addr = 6'd1; end  // x1 <= x
    if (i == 16) begin c.mbus = MB_SIN; c.sig_wr = 1'b1; c.addr = 6'd1; end
    return c;
  endfunction
  function automatic ctrl_t p2_word(input int i);
    ctrl_t c = CW_NOP;
    if (i <= 15) c.so_sh = 1'b1;                                  // decision to P1
    if (i >= 8 && i <= 23) c.si_sh = 1'b1;                        // f from P1
    if (i == 24) begin c.mbus = MB_SIN; c.bmux = B_MBUS; c.acc_ld = 1'b1; c.mem = MEM_RD; end
    if (i == 25) begin c.sor_ld = 1'b1; c.shift = 3'd2; end
    if (i == 26) begin c.amux = A_SHIFT; c.comp = COMP_ON; c.bmux = B_MBUS; c.acc_ld = 1'b1; c.sor_ld = 1'b1; c.shift = 3'd3; end
    if (i == 27) begin c.amux = A_SHIFT; c.comp = COMP_ON; c.bmux = B_MBUS; c.acc_ld = 1'b1; end
    if (i == 28) begin c.fsm_step = 1'b1; c.mem = MEM_RD; c.addr = 6'(PLUS); end
    if (i == 29) begin c.mbus = MB_MOR; c.mir_tr = 1'b1; c.mem = MEM_CWR; c.cw_bit = 2'd1; end
    if (i == 30) begin c.mem = MEM_RD; c.addr = 6'(MINUS); end
    if (i == 31) begin c.mbus = MB_MOR; c.mir_tr = 1'b1; c.mem = MEM_CWR; c.cw_bit = 2'd0; end
    if (i == 32) c.mem = MEM_RD;
    if (i == 33) begin c.mbus = MB_MOR; c.so_ld = 1'b1; end
    return c;
  endfunction
  function automatic img_t prog1();
    img_t p;
    for (int i = 0; i < 256; i++) p[i] = p1_word(i);
    return p;
  endfunction
  function automatic img_t prog2();
    img_t p;
    for (int i = 0; i < 256; i++) p[i] = p2_word(i);
    return p;
  endfunction
  function automatic logic [63:0][W-1:0] consts2();
    logic [63:0][W-1:0] c = '0;
    c[PLUS] = 16'h4000; c[MINUS] = 16'hc000;
    return c;
  endfunction

  logic clk = 0, rst = 1, sample = 0;
  logic [1:0] r1, s1o, v1, r2, s2o, v2;
  logic [W-1:0] sig_din = '0, sig_dout, d2;
  logic sig_oe, sig_rd, oe2, rd2;
  logic [ADDR_W-1:0] sig_chan, ch2;
  logic [1:0] busy, overrun;
  int checks = 0, failures = 0;

  mc_processor #(.W(W), .MAIN_LEN(M1), .N_ITER(0), .PROGRAM(prog1()), .HAS_AAU(1'b0), .HAS_FSM(1'b0)) u_p1 (
    .clk, .rst, .sample, .coef(2'b00), .sin({1'b0, s2o[0]}), .sin_req(r1), .sout(s1o), .sout_vld(v1), .sig_din,
    .sig_dout, .sig_oe, .sig_rd, .sig_chan, .busy(busy[0]), .overrun(overrun[0]));
  mc_processor #(.W(W), .MAIN_LEN(M2), .N_ITER(0), .PROGRAM(prog2()), .HAS_AAU(1'b0),
                 .RO_MASK(64'(3) << PLUS), .CONSTS(consts2())) u_p2 (
    .clk, .rst, .sample, .coef(2'b00), .sin({1'b0, s1o[0]}), .sin_req(r2), .sout(s2o), .sout_vld(v2), .sig_din('0),
    .sig_dout(d2), .sig_oe(oe2), .sig_rd(rd2), .sig_chan(ch2), .busy(busy[1]), .overrun(overrun[1]));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask
  function automatic logic signed [W-1:0] sat(input longint v);
    return (v > 32767) ? 16'sh7fff : (v < -32768) ? 16'sh8000 : W'(v);
  endfunction

  logic signed [W-1:0] x [NS], a_m [NS], d_d [NS + 1];
  bit sym [NS], got [NS + 1];
  int cur = 0, n_taken = 0, n_skip = 0, bl [2] = '{0, 0}, mb [2] = '{0, 0};
  always @(posedge clk) if (!rst) begin
    if (sig_oe && sig_chan == 6'd1) begin d_d[cur] = signed'(sig_dout); got[cur] = 1; end
    if (u_p2.cw.mem == MEM_CWR) begin if (u_p2.cw_en) n_taken++; else n_skip++; end
    for (int p = 0; p < 2; p++)
      if (busy[p]) bl[p]++; else begin if (bl[p] > mb[p]) mb[p] = bl[p]; bl[p] = 0; end
  end

  initial begin
    logic signed [W-1:0] x1, a1, f, v;
    int correct = 0;
    x1 = 0; a1 = 0;
    for (int n = 0; n < NS; n++) begin
      sym[n] = $urandom_range(0, 1);
      x[n] = W'((sym[n] ? 9000 : -9000) + ((n > 0) ? (sym[n - 1] ? 3000 : -3000) : 0) + $urandom_range(0, 1600) - 800);
      f = x[n];
      f = sat(longint'(f) - longint'(x[n] >>> 2));
      f = sat(longint'(f) - longint'(x1 >>> 2));
      v = sat(longint'(f) - longint'(a1 >>> 2));
      v = sat(longint'(v) - longint'(a1 >>> 3));
      a_m[n] = (v >= 0) ? 16'sh4000 : 16'shc000;
      x1 = x[n]; a1 = a_m[n];
      if ((a_m[n] > 0) == sym[n]) correct++;
    end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n <= NS; n++) begin
      cur = n; if (n < NS) sig_din = x[n];
      sample = 1; @(negedge clk); sample = 0;
      repeat (PERIOD - 1) @(negedge clk);
    end
    check(overrun == 2'b00, "both programs fit 43 clocks per sample");
    check(mb[0] == M1 && mb[1] == M2, $sformatf("program lengths %0d %0d", mb[0], mb[1]));
    check(got[0] && d_d[0] == 0, "first output is the reset state");
    for (int n = 0; n < NS; n++)
      check(got[n + 1] && d_d[n + 1] == a_m[n], $sformatf("decision %0d = %h want %h", n, d_d[n + 1], a_m[n]));
    check(n_taken == NS + 1 && n_skip == NS + 1, $sformatf("conditional writes taken %0d skipped %0d", n_taken, n_skip));
    $display("dfe: %0d symbols, %0d decided correctly, clocks used %0d/%0d of %0d", NS, correct, mb[0], mb[1], PERIOD);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat ((NS + 3) * PERIOD + 500) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
