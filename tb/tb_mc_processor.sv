// tb_mc_processor: checks one complete processor running the default
// microprogram of processor 3 (circular buffer indexed by IY, divide by a
// read-only constant, 4-iteration subprogram indexed by IX). The testbench
// plays the neighbours: it feeds a word z[n] bit-serially whenever the
// processor's serial input shifts, and collects the words it sends. Per sample
// it expects the sum of the last four z (saturating) from the previous sample
// and then z/0.75 as a serial two's-complement quotient. It also checks that
// the program runs for exactly 96 + 4*3 clocks per sample and that a strobe
// arriving during the program sets 'overrun'.
module tb_mc_processor;
  import mc_pkg::*;
  import mc_prog_pkg::*;
  localparam int W = 16, NS = 24, PERIOD = 120;
  logic clk = 0, rst = 1, sample = 0;
  logic [1:0] sin, sin_req, sout, sout_vld;
  logic [W-1:0] sig_dout;
  logic sig_oe, sig_rd, busy, overrun;
  logic [ADDR_W-1:0] sig_chan;
  int checks = 0, failures = 0;

  mc_processor #(.W(W), .MAIN_LEN(P3_MAIN), .SUB_LEN(P3_SUB), .N_ITER(P3_ITER), .PROGRAM(prog_p3()),
                 .IY_MOD(4), .RO_MASK(64'(1) << P3_DIV), .CONSTS(p3_consts())) dut (
    .clk, .rst, .sample, .coef(2'b00), .sin, .sin_req, .sout, .sout_vld, .sig_din('0),
    .sig_dout, .sig_oe, .sig_rd, .sig_chan, .busy, .overrun);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask
  function automatic logic signed [W-1:0] sat(input longint v);
    return (v > 32767) ? 16'sh7fff : (v < -32768) ? 16'sh8000 : W'(v);
  endfunction

  logic signed [W-1:0] z [NS];
  int cur = 0, inbit = 0, outbit = 0, nout = 0, busy_len = 0, max_busy = 0;
  logic [W-1:0] sh;
  logic [W-1:0] words [2 * NS + 2];

  assign sin = {1'b0, z[cur][15 - inbit]};
  always @(posedge clk) if (!rst) begin
    if (sin_req[0]) inbit <= (inbit + 1) % 16;
    if (sout_vld[0]) begin
      sh = {sh[14:0], sout[0]};
      if (outbit == 15) begin words[nout] = sh; nout++; end
      outbit = (outbit + 1) % 16;
    end
    if (busy) busy_len++;
    else begin if (busy_len > max_busy) max_busy = busy_len; busy_len = 0; end
  end

  initial begin
    logic signed [W-1:0] b4 [4], s, q;
    for (int n = 0; n < NS; n++) z[n] = W'($urandom_range(0, 49151) - 24575);   // |z| < 0.75
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < NS; n++) begin
      cur = n;
      sample = 1; @(negedge clk); sample = 0;
      repeat (PERIOD - 1) @(negedge clk);
    end
    sample = 1; @(negedge clk); sample = 0;
    repeat (30) @(negedge clk);
    check(!overrun, "no overrun at nominal rate");
    check(max_busy == 96 + 4 * 3, $sformatf("program length %0d", max_busy));
    sample = 1; @(negedge clk); sample = 0;
    @(negedge clk);
    check(overrun, "overrun when the strobe comes early");
    // model
    for (int i = 0; i < 4; i++) b4[i] = 0;
    s = 0;
    for (int n = 0; n < NS; n++) begin
      check(words[2 * n] == s, $sformatf("sum before sample %0d: %h want %h", n, words[2 * n], s));
      b4[n % 4] = z[n];
      q = signed'(words[2 * n + 1]);
      check(real'(q) * 0.75 / 32768.0 - real'(z[n]) / 32768.0 < 0.001 && real'(z[n]) / 32768.0 - real'(q) * 0.75 / 32768.0 < 0.001,
            $sformatf("quotient %0d: %h for z %h", n, q, z[n]));
      s = 0;
      for (int i = 0; i < 4; i++) s = sat(longint'(s) + longint'(b4[i]));
    end
    check(nout >= 2 * NS, "word count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat ((NS + 3) * PERIOD + 500) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
