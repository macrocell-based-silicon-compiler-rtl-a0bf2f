// tb_mc_host_if: checks the host interface. The host writes a block, which
// the processor side receives bit-serially (MSB first, on its shift
// requests) in the next frame; words sent bit-serially by the processor side
// are read by the host in the frame after. Also checks the frame interrupt,
// its acknowledge and the frame count.
module tb_mc_host_if;
  localparam int W = 16, FRAME = 8, IN_WORDS = 8, OUT_WORDS = 16, HAW = 5;
  logic clk = 0, rst = 1, sample = 0, tx_req = 0, rx_bit = 0, rx_vld = 0;
  logic tx_bit, irq, h_cs = 0, h_we = 0;
  logic [HAW-1:0] h_addr = '0;
  logic [W-1:0] h_wdata = '0, h_rdata;
  int checks = 0, failures = 0;

  mc_host_if #(.W(W), .FRAME(FRAME), .IN_WORDS(IN_WORDS), .OUT_WORDS(OUT_WORDS)) dut (
    .clk, .rst, .sample, .tx_bit, .tx_req, .rx_bit, .rx_vld, .h_cs, .h_we, .h_addr, .h_wdata, .h_rdata, .irq);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask
  task automatic host_wr(input int a, input logic [W-1:0] d);
    h_cs = 1; h_we = 1; h_addr = HAW'(a); h_wdata = d; @(negedge clk); h_cs = 0; h_we = 0;
  endtask
  task automatic host_rd(input int a, output logic [W-1:0] d);
    h_cs = 1; h_addr = HAW'(a); #1 d = h_rdata; @(negedge clk); h_cs = 0;
  endtask

  logic [W-1:0] hin [4][IN_WORDS], pout [4][OUT_WORDS];
  initial begin
    logic [W-1:0] d, got;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int f = 0; f < 4; f++) begin
      for (int j = 0; j < IN_WORDS; j++) hin[f][j] = W'($urandom);
      for (int j = 0; j < OUT_WORDS; j++) pout[f][j] = W'($urandom);
    end
    check(!irq, "no irq after reset");
    for (int j = 0; j < IN_WORDS; j++) host_wr(j, hin[1][j]);   // for frame 1
    for (int f = 0; f < 4; f++) begin
      for (int s = 0; s < FRAME; s++) begin
        sample = 1; @(negedge clk); sample = 0;
        if (s == 0 && f > 0) begin
          check(irq, "frame interrupt");
          host_rd(1 << (HAW - 1), d);
          check(d == W'(f), "frame count");
          if (f > 1) for (int j = 0; j < OUT_WORDS; j++) begin
            host_rd(j, d); check(d == pout[f - 1][j], $sformatf("host reads frame %0d word %0d", f - 1, j));
          end
          if (f < 3) for (int j = 0; j < IN_WORDS; j++) host_wr(j, hin[f + 1][j]);
          host_wr(1 << (HAW - 1), '0);
          check(!irq, "irq cleared");
        end
        // processor side: one input word and two output words per sample
        for (int b = W - 1; b >= 0; b--) begin
          tx_req = 1; #1 got[b] = tx_bit; @(negedge clk); tx_req = 0;
        end
        if (f > 0) check(got == hin[f][s], $sformatf("frame %0d sample %0d serial word %h want %h", f, s, got, hin[f][s]));
        else       check(got == '0, "frame 0 reads the cleared buffer");
        for (int k = 0; k < 2; k++)
          for (int b = W - 1; b >= 0; b--) begin
            rx_vld = 1; rx_bit = pout[f][2 * s + k][b]; @(negedge clk); rx_vld = 0;
          end
        repeat (5) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
