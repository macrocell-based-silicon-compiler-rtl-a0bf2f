// tb_mc_chip: end-to-end test of the four-processor chip with its default
// microprograms and parameters.
//
// Drives a sample strobe every PERIOD clocks, a signal value x[n] on the
// signal data bus, and acts as the host: on every frame interrupt it reads the
// block the processors produced in the previous frame and writes the gains
// for the next frame. Expected values come from a reference model of the
// algorithm in this file: the bit-serial multiply kA = -A + ~k15*A +
// sum k[15-i]*(A >>> i) with a saturating accumulator, z = y - y/4, the
// running peak, a non-restoring divide by 0.75 and the 4-sample moving sum.
// Loose checks against real arithmetic guard the model itself. It counts how
// often each mechanism occurs (variable and fixed coefficient multiplies,
// conditional write taken and skipped, writes from a held MIR, divides,
// subprogram iterations, IY wrap, saturation, frames, overrun) and fails if
// one never does. At the end two strobes are sent too close together to
// provoke the overrun flag.
module tb_mc_chip;
  import mc_pkg::*;
  localparam int W = 16, FRAME = 8, NFR = 5, NS = FRAME * NFR, PERIOD = 128;
  localparam int HAW = $clog2(2 * FRAME) + 1;

  logic clk = 0, rst = 1, sample = 0;
  logic [W-1:0] sig_din = '0, sig_dout, h_wdata = '0, h_rdata;
  logic sig_oe, sig_rd, irq, h_cs = 0, h_we = 0;
  logic [ADDR_W-1:0] sig_chan;
  logic [HAW-1:0] h_addr = '0;
  logic [3:0] busy, overrun;

  mc_chip dut (.clk, .rst, .sample, .sig_din, .sig_dout, .sig_oe, .sig_rd, .sig_chan,
               .h_cs, .h_we, .h_addr, .h_wdata, .h_rdata, .irq, .ext_sin(1'b0), .busy, .overrun);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // stimulus and model state
  logic signed [W-1:0] x [NS], g [NS], y_m [NS], z_m [NS], pk_m [NS], q_m [NS], s_m [NS];
  logic signed [W-1:0] y_d [NS], pk_d [NS];
  logic signed [W-1:0] hi_d [NS][2];
  bit   got_y [NS], got_pk [NS], got_hi [NS];
  int   cur = -1;

  function automatic logic signed [W-1:0] sat(input longint v);
    if (v > 32767) return 16'sh7fff;
    if (v < -32768) return 16'sh8000;
    return W'(v);
  endfunction

  function automatic logic signed [W-1:0] mul_model(input logic signed [W-1:0] k, input logic signed [W-1:0] a);
    logic signed [W-1:0] acc;
    acc = sat(-longint'(a));
    if (!k[15]) acc = sat(longint'(acc) + longint'(a));
    for (int i = 1; i < 16; i++) if (k[15 - i]) acc = sat(longint'(acc) + longint'(a >>> i));
    return acc;
  endfunction

  function automatic logic signed [W-1:0] div_model(input logic signed [W-1:0] n, input logic signed [W-1:0] d);
    logic signed [W-1:0] r, dd;
    logic [W-1:0] q;
    r = n; dd = d >>> 1;
    for (int i = 1; i < 16; i++) begin
      q[16 - i] = (r >= 0);
      r = (r >= 0) ? sat(longint'(r) - longint'(dd)) : sat(longint'(r) + longint'(dd));
      dd = dd >>> 1;
    end
    q[15] = ~q[15];
    q[0] = 1'b1;
    return signed'(q);
  endfunction

  function automatic real frac(input logic signed [W-1:0] v);
    return real'(v) / 32768.0;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // reference model
  initial begin
    logic signed [W-1:0] peak, buf4 [4], acc;
    peak = 0;
    for (int i = 0; i < 4; i++) buf4[i] = 0;
    for (int n = 0; n < NS; n++) begin
      x[n] = W'($urandom);
      g[n] = (n < FRAME) ? 16'sd0 : W'($urandom);
      if (n % 5 == 3) begin x[n] = 16'sh7200; g[n] = (n < FRAME) ? 16'sd0 : 16'sh7e00; end
      y_m[n] = mul_model(g[n], x[n]);
      acc = y_m[n];
      z_m[n] = sat(longint'(acc) - longint'(y_m[n] >>> 2));
      if (sat(longint'(z_m[n]) - longint'(peak)) >= 0) peak = z_m[n];
      pk_m[n] = peak;
      buf4[n % 4] = z_m[n];
      q_m[n] = div_model(z_m[n], 16'sh6000);
      acc = 0;
      for (int i = 0; i < 4; i++) acc = sat(longint'(acc) + longint'(buf4[i]));
      s_m[n] = acc;
    end
  end

  // mechanism counters
  int n_varmul = 0, n_csd = 0, n_cw_taken = 0, n_cw_skip = 0, n_mir_held = 0, n_div = 0;
  int n_iter = 0, n_iy_wrap = 0, n_sat = 0, n_irq = 0, n_overrun = 0, n_serial_words = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.u_p1.cw.amux == A_COEF0 && dut.u_p1.cw.coef_inv) n_varmul++;
    if (dut.u_p2.cw.comp == COMP_ON && dut.u_p2.cw.amux == A_SHIFT && dut.u_p2.pc_addr == 8'd57 && dut.u_p2.pc_active) n_csd++;
    if (dut.u_p2.cw.mem == MEM_CWR) begin
      if (dut.u_p2.cw_en) n_cw_taken++; else n_cw_skip++;
    end
    if (dut.u_p1.cw.mem == MEM_WR && !dut.u_p1.cw.mir_tr) n_mir_held++;
    if (dut.u_p3.cw.quot == Q_FIRST) n_div++;
    if (dut.u_p3.iter_start) n_iter++;
    if (sample && dut.u_p3.g_aau.u_aau.iy == 6'd3) n_iy_wrap++;
    if (dut.u_p3.cw.acc_ld && dut.u_p3.u_auio.ovf) n_sat++;
    if (dut.u_hif.rx_vld && dut.u_hif.rcnt == 4'd15) n_serial_words++;
  end

  // signal data bus
  always @(posedge clk) if (!rst && cur >= 0 && cur < NS && sig_oe) begin
    if (sig_chan == 6'd1) begin y_d[cur] = signed'(sig_dout); got_y[cur] = 1; end
    if (sig_chan == 6'd2) begin pk_d[cur] = signed'(sig_dout); got_pk[cur] = 1; end
  end
  always @(posedge clk) if (!rst && sig_rd) check(sig_chan == 6'd0, "signal read channel");

  task automatic host_wr(input int a, input logic [W-1:0] d);
    @(negedge clk); h_cs = 1; h_we = 1; h_addr = HAW'(a); h_wdata = d;
    @(negedge clk); h_cs = 0; h_we = 0;
  endtask
  task automatic host_rd(input int a, output logic [W-1:0] d);
    @(negedge clk); h_cs = 1; h_we = 0; h_addr = HAW'(a);
    #1 d = h_rdata;
    @(negedge clk); h_cs = 0;
  endtask

  // host: write gains for frame f+1, read the block of frame f-1
  initial begin : host
    logic [W-1:0] d;
    wait (!rst);
    for (int j = 0; j < FRAME; j++) host_wr(j, g[FRAME + j]);
    for (int f = 1; f < NFR; f++) begin
      @(posedge clk iff irq);
      n_irq++;
      host_rd(1 << (HAW - 1), d);
      check(d == W'(f), $sformatf("frame count %0d got %0d", f, d));
      for (int j = 0; j < 2 * FRAME; j++) begin
        host_rd(j, d);
        hi_d[(f - 1) * FRAME + j / 2][j % 2] = signed'(d);
      end
      for (int j = 0; j < FRAME; j++) got_hi[(f - 1) * FRAME + j] = 1;
      if (f + 1 < NFR) for (int j = 0; j < FRAME; j++) host_wr(j, g[(f + 1) * FRAME + j]);
      host_wr(1 << (HAW - 1), '0);
      check(!irq, "irq acknowledged");
    end
  end

  // sample strobes and checks
  initial begin
    repeat (4) @(posedge clk);
    rst = 0;
    repeat (40) @(posedge clk);
    for (int n = 0; n < NS; n++) begin
      @(negedge clk); sample = 1; sig_din = x[n]; cur = n;
      @(negedge clk); sample = 0;
      repeat (PERIOD - 2) @(negedge clk);
    end
    // one more strobe to close the last frame, then a too-early one
    @(negedge clk); sample = 1; cur = NS;
    @(negedge clk); sample = 0;
    repeat (60) @(negedge clk);
    check(overrun == 4'b0000, "no overrun at the nominal rate");
    @(negedge clk); sample = 1;
    @(negedge clk); sample = 0;
    repeat (2) @(negedge clk);
    check(overrun[2] && overrun[1] && !overrun[3], $sformatf("overrun flags %b", overrun));
    if (overrun[2]) n_overrun++;
    repeat (200) @(negedge clk);

    for (int n = 0; n < NS; n++) begin
      check(got_y[n] && y_d[n] == y_m[n], $sformatf("y[%0d] = %h want %h (g=%h x=%h)", n, y_d[n], y_m[n], g[n], x[n]));
      check(got_pk[n] && pk_d[n] == pk_m[n], $sformatf("peak[%0d] = %h want %h", n, pk_d[n], pk_m[n]));
      // the model against plain arithmetic
      check(y_m[n] == 16'sh7fff || y_m[n] == 16'sh8000 ||
            (frac(y_m[n]) - frac(g[n]) * frac(x[n]) < 20.0/32768 && frac(g[n]) * frac(x[n]) - frac(y_m[n]) < 20.0/32768),
            $sformatf("multiply model %0d", n));
      check(frac(q_m[n]) * 0.75 - frac(z_m[n]) < 30.0/32768 && frac(z_m[n]) - frac(q_m[n]) * 0.75 < 30.0/32768,
            $sformatf("divide model %0d", n));
    end
    for (int n = 0; n < (NFR - 1) * FRAME; n++) begin
      check(got_hi[n], $sformatf("host block word %0d read", n));
      check(hi_d[n][0] == ((n == 0) ? 16'sd0 : s_m[n - 1]), $sformatf("sum[%0d] = %h want %h", n, hi_d[n][0], (n == 0) ? 16'sd0 : s_m[n - 1]));
      check(hi_d[n][1] == q_m[n], $sformatf("quot[%0d] = %h want %h", n, hi_d[n][1], q_m[n]));
    end
    $display("sample 10: x=%h g=%h y=%h peak=%h sum=%h quot=%h", x[10], g[10], y_d[10], pk_d[10], hi_d[10][0], hi_d[10][1]);
    $display("mechanisms: varmul=%0d csd=%0d cwr_taken=%0d cwr_skipped=%0d mir_held=%0d div=%0d iter=%0d iy_wrap=%0d sat=%0d irq=%0d serial_words=%0d overrun=%0d",
             n_varmul, n_csd, n_cw_taken, n_cw_skip, n_mir_held, n_div, n_iter, n_iy_wrap, n_sat, n_irq, n_serial_words, n_overrun);
    check(n_varmul >= NS, "variable-coefficient multiply happened");
    check(n_csd >= NS, "fixed-coefficient (CSD) multiply happened");
    check(n_cw_taken > 0, "conditional write taken");
    check(n_cw_skip > 0, "conditional write skipped");
    check(n_mir_held >= NS, "write from held MIR");
    check(n_div >= NS, "divide happened");
    check(n_iter >= 4 * NS, "subprogram iterations");
    check(n_iy_wrap > 0, "IY wrapped");
    check(n_sat > 0, "saturation happened");
    check(n_irq == NFR - 1, "frame interrupts");
    check(n_serial_words >= 2 * NS, "serial words to host interface");
    check(n_overrun > 0, "overrun detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat ((NS + 4) * PERIOD + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
