// tb_mc_auio: checks the arithmetic unit with I/O ports by driving control
// words directly, with a small memory model in the testbench.
//  * variable-coefficient multiply: coefficient bits fed serially MSB first,
//    one partial product per clock; the product must appear in ACC exactly
//    16 clocks after the first coefficient bit and equal the testbench's
//    evaluation of kA = -A + ~k15*A + sum k[15-i]*(A>>>i), and be near k*A
//    (alternately on coefficient input 0 and 1)
//  * fixed-coefficient multiplies by signed-digit sums (0.75, 0.875)
//  * non-restoring divide: serial two's-complement quotient near N/D
//  * saturation, MIR held and transparent writes, conditional write,
//    serial-parallel / parallel-serial ports and the signal bus
module tb_mc_auio;
  import mc_pkg::*;
  localparam int W = 16;
  logic clk = 0, rst = 1;
  ctrl_t cw = CW_NOP;
  logic [W-1:0] mem_rdata, mem_wdata, sig_din = '0, sig_dout, acc_q;
  logic mem_we, cw_en = 0, sig_oe, sig_rd;
  logic [2:0] cond;
  logic [1:0] coef = '0, sin = '0, sin_req, sout, sout_vld;
  logic [ADDR_W-1:0] sig_chan;
  logic [W-1:0] tmem [64];
  int checks = 0, failures = 0;

  mc_auio #(.W(W)) dut (.clk, .rst, .cw, .mem_rdata, .mem_we, .mem_wdata, .cw_en, .cond,
    .coef, .sin, .sin_req, .sout, .sout_vld, .sig_din, .sig_dout, .sig_oe, .sig_rd, .sig_chan, .acc_q);
  always #5 clk = ~clk;
  assign mem_rdata = tmem[cw.addr];
  always @(posedge clk) if (mem_we) tmem[cw.addr] <= mem_wdata;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask
  // apply one control word for one clock
  task automatic run(input ctrl_t c);
    cw = c; @(negedge clk);
  endtask
  function automatic logic signed [W-1:0] sat(input longint v);
    return (v > 32767) ? 16'sh7fff : (v < -32768) ? 16'sh8000 : W'(v);
  endfunction
  function automatic logic signed [W-1:0] mul_model(input logic signed [W-1:0] k, input logic signed [W-1:0] a);
    logic signed [W-1:0] acc;
    acc = sat(-longint'(a));
    if (!k[15]) acc = sat(longint'(acc) + longint'(a));
    for (int i = 1; i < 16; i++) if (k[15 - i]) acc = sat(longint'(acc) + longint'(a >>> i));
    return acc;
  endfunction

  ctrl_t c;
  initial begin
    logic signed [W-1:0] a, k, want, n, d, q;
    int t0;
    for (int i = 0; i < 64; i++) tmem[i] = '0;
    repeat (2) @(negedge clk);
    rst = 0;

    // variable-coefficient multiplies
    for (int r = 0; r < 40; r++) begin
      a = W'($urandom); k = W'($urandom);
      if (r == 0) begin a = 16'sh4000; k = 16'sh4000; end
      if (r == 1) begin a = 16'sh7fff; k = 16'sh8000; end
      tmem[1] = a;
      c = CW_NOP; c.mem = MEM_RD; c.addr = 6'd1; run(c);
      c = CW_NOP; c.sor_ld = 1; run(c);
      c = CW_NOP; c.amux = A_SHIFT; c.comp = COMP_ON; c.acc_ld = 1; run(c);
      t0 = 0;
      for (int b = 15; b >= 0; b--) begin
        // even rounds use COEF0, odd rounds COEF1; the other input carries
        // the inverted bit, so taking the wrong input shows
        c = CW_NOP; c.amux = (r % 2) ? A_COEF1 : A_COEF0; c.coef_inv = (b == 15); c.bmux = B_MBUS; c.acc_ld = 1;
        c.shsrc = 1; c.shift = 3'd1; c.sor_ld = 1;
        coef[r % 2] = k[b]; coef[1 - r % 2] = ~k[b]; run(c); t0++;
      end
      want = mul_model(k, a);
      check(t0 == 16 && signed'(acc_q) == want, $sformatf("mul %h*%h = %h want %h", k, a, acc_q, want));
      check(signed'(acc_q) - (longint'(k) * longint'(a)) / 32768 <= 17 && (longint'(k) * longint'(a)) / 32768 - signed'(acc_q) <= 17 || want == 16'sh7fff,
            "product near k*A");
      if (r == 0) check(acc_q == 16'h2000, "0.5 * 0.5 = 0.25");
    end

    // fixed coefficients: 0.75 = 1 - 1/4, 0.875 = 1 - 1/8
    for (int r = 0; r < 20; r++) begin
      a = W'($urandom); tmem[2] = a;
      c = CW_NOP; c.mem = MEM_RD; c.addr = 6'd2; run(c);
      c = CW_NOP; c.sor_ld = 1; run(c);
      c = CW_NOP; c.amux = A_SHIFT; c.acc_ld = 1; c.sor_ld = 1; c.shift = 3'd2; run(c);
      c = CW_NOP; c.amux = A_SHIFT; c.comp = COMP_ON; c.bmux = B_MBUS; c.acc_ld = 1; run(c);
      check(signed'(acc_q) == sat(longint'(a) - longint'(a >>> 2)), "csd 0.75");
      c = CW_NOP; c.bmux = B_MOR; c.acc_ld = 1; c.sor_ld = 1; c.shift = 3'd3; run(c);
      c = CW_NOP; c.amux = A_SHIFT; c.comp = COMP_ON; c.bmux = B_MBUS; c.acc_ld = 1; run(c);
      check(signed'(acc_q) == sat(longint'(a) - longint'(a >>> 3)), "csd 0.875");
    end

    // divide N/D with |N| < D, serial quotient on port 0
    for (int r = 0; r < 30; r++) begin
      d = W'($urandom_range(8192, 32767));
      n = W'($urandom_range(0, 2 * int'(d) - 2) - int'(d) + 1);
      tmem[3] = d; tmem[4] = n;
      c = CW_NOP; c.mem = MEM_RD; c.addr = 6'd3; run(c);
      c = CW_NOP; c.sor_ld = 1; c.shift = 3'd1; c.mem = MEM_RD; c.addr = 6'd4; run(c);
      c = CW_NOP; c.bmux = B_MOR; c.acc_ld = 1; run(c);
      for (int i = 1; i <= 16; i++) begin
        c = CW_NOP;
        if (i < 16) begin
          c.shsrc = 1; c.shift = 3'd1; c.sor_ld = 1;
          c.comp = COMP_DIV; c.amux = A_SHIFT; c.bmux = B_MBUS; c.acc_ld = 1;
          c.quot = (i == 1) ? Q_FIRST : Q_BIT;
        end else c.quot = Q_ONE;
        cw = c; #1;
        check(sout_vld[0] && !sout_vld[1], "quotient bit valid");
        q[16 - i] = sout[0];
        @(negedge clk);
      end
      check((real'(q) / 32768.0) - real'(n) / real'(d) < 0.002 && real'(n) / real'(d) - (real'(q) / 32768.0) < 0.002,
            $sformatf("divide %h/%h = %h", n, d, q));
    end

    // saturation
    tmem[5] = 16'h7000;
    c = CW_NOP; c.mem = MEM_RD; c.addr = 6'd5; run(c);
    c = CW_NOP; c.sor_ld = 1; c.bmux = B_MOR; c.acc_ld = 1; run(c);
    c = CW_NOP; c.amux = A_SHIFT; c.bmux = B_MBUS; c.acc_ld = 1; run(c);
    check(acc_q == 16'h7fff && cond[2], "positive saturation");
    c = CW_NOP; c.amux = A_SHIFT; c.comp = COMP_ON; c.bmux = B_ZERO; c.acc_ld = 1; run(c);
    check(acc_q == 16'h9000 && !cond[2] && cond[0], "negate, flags");
    c = CW_NOP; c.amux = A_SHIFT; c.comp = COMP_ON; c.bmux = B_MBUS; c.acc_ld = 1; run(c);
    check(acc_q == 16'h8000 && cond[2], "negative saturation");
    c = CW_NOP; c.acc_ld = 1; run(c);
    check(acc_q == 16'h0000 && cond[1] && !cond[2], "zero flag");

    // MIR: hold, then write later; transparent write
    sig_din = 16'h1234;
    c = CW_NOP; c.mbus = MB_SIG; c.sig_rd = 1; c.bmux = B_MBUS; c.acc_ld = 1; cw = c; #1;
    check(sig_rd && sig_chan == 6'd0, "signal read strobe"); @(negedge clk);
    c = CW_NOP; c.mir_ld = 1; run(c);
    c = CW_NOP; c.acc_ld = 1; run(c);                         // ACC changes
    c = CW_NOP; c.mem = MEM_WR; c.addr = 6'd10; run(c);        // later free cycle
    check(tmem[10] == 16'h1234, "held MIR written");
    sig_din = 16'h5555;
    c = CW_NOP; c.mbus = MB_SIG; c.mir_tr = 1; c.mem = MEM_WR; c.addr = 6'd11; run(c);
    check(tmem[11] == 16'h5555, "transparent write");
    // conditional write
    tmem[12] = 16'h0; cw_en = 0;
    c = CW_NOP; c.mbus = MB_SIG; c.mir_tr = 1; c.mem = MEM_CWR; c.addr = 6'd12; run(c);
    check(tmem[12] == 16'h0, "conditional write skipped");
    cw_en = 1; run(c);
    check(tmem[12] == 16'h5555, "conditional write taken");
    cw_en = 0;

    // serial ports: port 1 out, port 0 in (looped by the testbench)
    sig_din = 16'hA5C3;
    c = CW_NOP; c.mbus = MB_SIG; c.so_ld = 1; c.port = 1; run(c);
    for (int b = 15; b >= 0; b--) begin
      c = CW_NOP; c.so_sh = 1; c.port = 1; cw = c; #1;
      check(sout_vld[1] && sout[1] == sig_din[b], "serial out bit");
      sin[0] = sout[1];
      @(negedge clk);
      c = CW_NOP; c.si_sh = 1; c.port = 0; cw = c; #1;
      check(sin_req[0], "serial in request");
      @(negedge clk);
    end
    c = CW_NOP; c.mbus = MB_SIN; c.port = 0; c.sig_wr = 1; c.addr = 6'd5; cw = c; #1;
    check(sig_oe && sig_chan == 6'd5 && sig_dout == 16'hA5C3, "serial loop word on the signal bus");
    @(negedge clk);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
