// tb_wl_lpc: LPC-vocoder workload, synthesis side, on three processors at the
// vocoder's rate of 625 clocks per sample (8 kHz at a 5 MHz clock).
//
// A host interface delivers one parameter block per frame of 16 samples: ten
// reflection coefficients, a gain and a pitch period (in samples). The
// coefficient processor (PK) takes one block word per sample into a table
// indexed by IY (modulus 16, one frame). Each sample it sends the pitch period
// to the excitation processor (PE) and streams the gain and the coefficients,
// bit-serially and MSB first, into the coefficient input of the lattice
// processor (PL).
//
// PE makes a pitch pulse train without branches: it counts a down-counter C
// by one each sample; the FSM notes C < 0, and two conditional writes then
// reload C with C + T and replace the excitation 0 by the pulse amplitude
// (a read-only constant). The excitation goes serially to PL.
//
// PL scales the excitation by the gain with a variable-coefficient multiply,
// then runs a 10-stage all-pole lattice
//   f[i-1] = f[i] - k[i]*b[i-1](n-1),   b[i](n) = b[i-1](n-1) + k[i]*f[i-1]
// as a 43-word subprogram iterated 10 times, IX indexing the state, and
// writes f[0] of the previous sample to signal channel 1. PK and PL have the
// same main and subprogram lengths, so their serial transfers stay in
// lockstep. Clocks per sample: PK and PL 54 + 10*43 = 484, PE 55, of 625.
// Pipeline: the excitation computed in sample n is used by PL in sample n+1.
// Unvoiced (noise) excitation and the analysis side of the vocoder are not
// part of this test. Expected outputs come from a model of the same
// saturating operations in this file.
module tb_wl_lpc;
  import mc_pkg::*;
  localparam int W = 16, P = 10, FRAME = 16, NFR = 5, NS = FRAME * NFR, PERIOD = 625;
  localparam int MAIN = 54, SUB = 43, PE_MAIN = 55;
  localparam int F = 1, U = 0, BST = 9, KT = 32;           // PL and PK memory
  localparam int T = 1, C = 2, E = 3, ONE = 10, AMP = 11;  // PE memory
  localparam logic [W-1:0] AMP_V = 16'h4000;
  typedef logic [255:0][CW_W-1:0] img_t;

  // shared pieces of the serial multiplies
  function automatic ctrl_t mul_step(input ctrl_t c0, input bit first, input bit sub);
    ctrl_t c = c0;
    c.amux = A_COEF0; c.coef_inv = first; c.comp = sub ? COMP_ON : COMP_OFF;
    c.bmux = B_MBUS; c.mbus = MB_ACC; c.acc_ld = 1'b1;
    c.shsrc = 1'b1; c.shift = 3'd1; c.sor_ld = 1'b1;
    return c;
  endfunction

  function automatic ctrl_t pl_word(input int i);
    ctrl_t c = CW_NOP;
    int s;
    if (i <= 15) c.si_sh = 1'b1;                                                        // excitation
    if (i == 0) begin c.mem = MEM_RD; c.addr = 6'(F); end
    if (i == 1) begin c.mbus = MB_MOR; c.sig_wr = 1'b1; c.addr = 6'd1; end              // channel 1
    if (i == 2) begin c.mbus = MB_MOR; c.mir_tr = 1'b1; c.mem = MEM_WR; c.addr = 6'(BST + P - 1); end
    if (i == 16) begin c.mbus = MB_SIN; c.mir_tr = 1'b1; c.mem = MEM_WR; c.addr = 6'(U); end
    if (i == 17) begin c.mem = MEM_RD; c.addr = 6'(U); end
    if (i == 18) c.sor_ld = 1'b1;
    if (i == 19) begin c.amux = A_SHIFT; c.comp = COMP_ON; c.acc_ld = 1'b1; end
    if (i >= 20 && i <= 35) c = mul_step(c, i == 20, 1'b0);                             // gain * u
    s = i - MAIN;
    if (s == 0 || s == 20) begin c.mem = MEM_RD; c.addr = 6'(BST); c.amode = AM_IX; end
    if (s == 1 || s == 22) c.sor_ld = 1'b1;
    if (s == 2) begin c.amux = A_SHIFT; c.bmux = B_MBUS; c.acc_ld = 1'b1; end          // ACC = f + B
    if (s >= 3 && s <= 18) c = mul_step(c, s == 3, 1'b1);                               // - k*B
    if (s == 19) begin c.mbus = MB_ACC; c.mir_tr = 1'b1; c.mem = MEM_WR; c.addr = 6'(F); end
    if (s == 21) begin c.bmux = B_MOR; c.acc_ld = 1'b1; c.mem = MEM_RD; c.addr = 6'(F); end
    if (s == 23) begin c.amux = A_SHIFT; c.comp = COMP_ON; c.bmux = B_MBUS; c.acc_ld = 1'b1; end // B - f
    if (s >= 24 && s <= 39) c = mul_step(c, s == 24, 1'b0);                             // + k*f
    if (s == 40) begin c.mbus = MB_ACC; c.mir_tr = 1'b1; c.mem = MEM_WR; c.addr = 6'(BST - 1); c.amode = AM_IX; end
    if (s == 41) begin c.mem = MEM_RD; c.addr = 6'(F); end
    if (s == 42) begin c.bmux = B_MOR; c.acc_ld = 1'b1; end
    return c;
  endfunction

  function automatic ctrl_t pk_word(input int i);
    ctrl_t c = CW_NOP;
    int s;
    if (i <= 15) c.si_sh = 1'b1;                                           // block word
    if (i == 16) begin c.mbus = MB_SIN; c.mir_tr = 1'b1; c.mem = MEM_WR; c.addr = 6'(KT); c.amode = AM_IY; end
    if (i == 17) begin c.mem = MEM_RD; c.addr = 6'(KT + P); end            // gain
    if (i == 18) begin c.mbus = MB_MOR; c.so_ld = 1'b1; end
    if (i >= 20 && i <= 35) c.so_sh = 1'b1;
    if (i == 36) begin c.mem = MEM_RD; c.addr = 6'(KT + P + 1); end        // pitch period
    if (i == 37) begin c.mbus = MB_MOR; c.so_ld = 1'b1; c.port = 1'b1; end
    if (i >= 38 && i <= 53) begin c.so_sh = 1'b1; c.port = 1'b1; end
    s = i - MAIN;
    if (s == 0) begin c.mem = MEM_RD; c.addr = 6'(KT); c.amode = AM_IX; end
    if (s == 1 || s == 19) begin c.mbus = MB_MOR; c.so_ld = 1'b1; end
    if ((s >= 3 && s <= 18) || (s >= 24 && s <= 39)) c.so_sh = 1'b1;
    return c;
  endfunction

  function automatic ctrl_t pe_word(input int i);
    ctrl_t c = CW_NOP;
    if (i <= 15) c.so_sh = 1'b1;                                           // excitation out
    if (i == 16) begin c.mem = MEM_RD; c.addr = 6'(ONE); end
    if (i == 17) begin c.sor_ld = 1'b1; c.mem = MEM_RD; c.addr = 6'(C); end
    if (i == 18) begin c.amux = A_SHIFT; c.comp = COMP_ON; c.bmux = B_MOR; c.acc_ld = 1'b1; end   // C - 1
    if (i == 19) begin c.fsm_step = 1'b1; c.mbus = MB_ACC; c.mir_tr = 1'b1; c.mem = MEM_WR; c.addr = 6'(C); end
    if (i == 20) begin c.mem = MEM_RD; c.addr = 6'(T); end
    if (i == 21) c.sor_ld = 1'b1;
    if (i == 22) begin c.amux = A_SHIFT; c.bmux = B_MBUS; c.mbus = MB_ACC; c.acc_ld = 1'b1; end   // + T
    if (i == 23) begin c.mbus = MB_ACC; c.mir_tr = 1'b1; c.mem = MEM_CWR; c.addr = 6'(C); end     // if C < 0
    if (i == 24) c.acc_ld = 1'b1;                                                                 // ACC = 0
    if (i == 25) begin c.mbus = MB_ACC; c.mir_tr = 1'b1; c.mem = MEM_WR; c.addr = 6'(E); end
    if (i == 26) begin c.mem = MEM_RD; c.addr = 6'(AMP); end
    if (i == 27) begin c.mbus = MB_MOR; c.mir_tr = 1'b1; c.mem = MEM_CWR; c.addr = 6'(E); end     // pulse
    if (i == 28) begin c.mem = MEM_RD; c.addr = 6'(E); end
    if (i == 29) begin c.mbus = MB_MOR; c.so_ld = 1'b1; end
    if (i >= 38 && i <= 53) c.si_sh = 1'b1;                                // next pitch period
    if (i == 54) begin c.mbus = MB_SIN; c.mir_tr = 1'b1; c.mem = MEM_WR; c.addr = 6'(T); end
    return c;
  endfunction

  function automatic img_t pl_prog();
    img_t p;
    for (int i = 0; i < 256; i++) p[i] = pl_word(i);
    return p;
  endfunction
  function automatic img_t pk_prog();
    img_t p;
    for (int i = 0; i < 256; i++) p[i] = pk_word(i);
    return p;
  endfunction
  function automatic img_t pe_prog();
    img_t p;
    for (int i = 0; i < 256; i++) p[i] = pe_word(i);
    return p;
  endfunction
  function automatic logic [63:0][W-1:0] pe_consts();
    logic [63:0][W-1:0] k = '0;
    k[ONE] = 16'd1; k[AMP] = AMP_V;
    return k;
  endfunction

  logic clk = 0, rst = 1, sample = 0;
  logic [1:0] kreq, ksout, kvld, lreq, lsout, lvld, ereq, esout, evld;
  logic [W-1:0] sig_dout, kd, ed, h_wdata = '0, h_rdata;
  logic sig_oe, sig_rd, koe, krd, eoe, erd, tx_bit, irq, h_cs = 0, h_we = 0;
  logic [ADDR_W-1:0] sig_chan, kch, ech;
  logic [4:0] h_addr = '0;
  logic [2:0] busy, overrun;
  int checks = 0, failures = 0;

  mc_host_if #(.W(W), .FRAME(FRAME), .IN_WORDS(FRAME), .OUT_WORDS(FRAME)) u_hif (
    .clk, .rst, .sample, .tx_bit, .tx_req(kreq[0]), .rx_bit(1'b0), .rx_vld(1'b0),
    .h_cs, .h_we, .h_addr, .h_wdata, .h_rdata, .irq);
  mc_processor #(.W(W), .MAIN_LEN(MAIN), .SUB_LEN(SUB), .N_ITER(P), .IY_MOD(FRAME), .PROGRAM(pk_prog()),
                 .AAU_PTR(1'b0), .HAS_FSM(1'b0)) u_pk (
    .clk, .rst, .sample, .coef(2'b00), .sin({1'b0, tx_bit}), .sin_req(kreq), .sout(ksout), .sout_vld(kvld),
    .sig_din('0), .sig_dout(kd), .sig_oe(koe), .sig_rd(krd), .sig_chan(kch), .busy(busy[0]), .overrun(overrun[0]));
  mc_processor #(.W(W), .MAIN_LEN(PE_MAIN), .N_ITER(0), .PROGRAM(pe_prog()), .RO_MASK(64'(3) << ONE), .CONSTS(pe_consts()),
                 .HAS_AAU(1'b0), .HAS_FSM(1'b1)) u_pe (
    .clk, .rst, .sample, .coef(2'b00), .sin({1'b0, ksout[1]}), .sin_req(ereq), .sout(esout), .sout_vld(evld),
    .sig_din('0), .sig_dout(ed), .sig_oe(eoe), .sig_rd(erd), .sig_chan(ech), .busy(busy[1]), .overrun(overrun[1]));
  mc_processor #(.W(W), .MAIN_LEN(MAIN), .SUB_LEN(SUB), .N_ITER(P), .PROGRAM(pl_prog()), .AAU_IY(1'b0), .AAU_PTR(1'b0),
                 .HAS_FSM(1'b0)) u_pl (
    .clk, .rst, .sample, .coef({1'b0, ksout[0]}), .sin({1'b0, esout[0]}), .sin_req(lreq), .sout(lsout), .sout_vld(lvld),
    .sig_din('0), .sig_dout, .sig_oe, .sig_rd, .sig_chan, .busy(busy[2]), .overrun(overrun[2]));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask
  function automatic logic signed [W-1:0] sat(input longint v);
    return (v > 32767) ? 16'sh7fff : (v < -32768) ? 16'sh8000 : W'(v);
  endfunction
  // start + k*a (sub = 0) or start - k*a (sub = 1), bit-serial sequence
  function automatic logic signed [W-1:0] mac(input logic signed [W-1:0] start, input logic signed [W-1:0] k,
                                              input logic signed [W-1:0] a, input bit sub);
    logic signed [W-1:0] acc;
    acc = sub ? sat(longint'(start) + longint'(a)) : sat(longint'(start) - longint'(a));
    if (!k[15]) acc = sub ? sat(longint'(acc) - longint'(a)) : sat(longint'(acc) + longint'(a));
    for (int i = 1; i < 16; i++)
      if (k[15 - i]) acc = sub ? sat(longint'(acc) - longint'(a >>> i)) : sat(longint'(acc) + longint'(a >>> i));
    return acc;
  endfunction

  logic [W-1:0] blk [NFR][FRAME];
  logic signed [W-1:0] s_m [NS], s_d [NS + 1];
  bit got [NS + 1];
  int cur = 0, bl = 0, mb = 0, pe_bl = 0, pe_mb = 0, n_cwr = 0, pulses = 0;
  always @(posedge clk) if (!rst) begin
    if (sig_oe && sig_chan == 6'd1) begin s_d[cur] = signed'(sig_dout); got[cur] = 1; end
    if (busy[2]) bl++; else begin if (bl > mb) mb = bl; bl = 0; end
    if (busy[1]) pe_bl++; else begin if (pe_bl > pe_mb) pe_mb = pe_bl; pe_bl = 0; end
    if (u_pe.cw.mem == MEM_CWR && u_pe.cw_en) n_cwr++;
  end

  task automatic host_wr(input int a, input logic [W-1:0] d);
    @(negedge clk); h_cs = 1; h_we = 1; h_addr = 5'(a); h_wdata = d;
    @(negedge clk); h_cs = 0; h_we = 0;
  endtask
  initial begin : host
    wait (!rst);
    for (int j = 0; j < FRAME; j++) host_wr(j, blk[1][j]);
    for (int f = 1; f < NFR; f++) begin
      @(posedge clk iff irq);
      if (f + 1 < NFR) for (int j = 0; j < FRAME; j++) host_wr(j, blk[f + 1][j]);
      host_wr(16, '0);
    end
  end

  initial begin
    logic [W-1:0] kt [FRAME];
    logic signed [W-1:0] bst [P], fi, bnew [P], g, cm, tm, em, esent, cnext;
    real e2 = 0;
    // parameter blocks: word j < P is k[P-j], word P the gain, word P+1 the
    // pitch period in samples; frame 0 is all zero
    for (int f = 0; f < NFR; f++)
      for (int j = 0; j < FRAME; j++)
        blk[f][j] = (f == 0) ? '0 : (j < P) ? W'($urandom_range(0, 2 * 19000) - 19000) :
                    (j == P) ? W'($urandom_range(6000, 16000)) : (j == P + 1) ? W'($urandom_range(20, 60)) : '0;
    // model
    for (int j = 0; j < FRAME; j++) kt[j] = '0;
    for (int i = 0; i < P; i++) bst[i] = 0;
    cm = 0; tm = 0; esent = 0;
    for (int n = 0; n < NS; n++) begin
      kt[n % FRAME] = blk[n / FRAME][n % FRAME];
      g = kt[P];
      // excitation processor: counts down, fires a pulse when the count goes negative
      cnext = sat(longint'(cm) - 1);
      if (cnext < 0) begin cm = sat(longint'(cnext) + longint'(tm)); em = signed'(AMP_V); pulses++; end
      else begin cm = cnext; em = 0; end
      tm = signed'(kt[P + 1]);
      // lattice processor, using the excitation of the previous sample
      fi = mac(16'sd0, g, esent, 1'b0);
      esent = em;
      for (int j = 0; j < P; j++) begin
        logic signed [W-1:0] b;
        b = bst[j];
        fi = mac(fi, kt[j], b, 1'b1);
        if (j > 0) bnew[j - 1] = mac(b, kt[j], fi, 1'b0);
      end
      for (int j = 0; j < P - 1; j++) bst[j] = bnew[j];
      bst[P - 1] = fi;
      s_m[n] = fi;
      e2 += real'(fi) * real'(fi);
    end
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (60) @(negedge clk);
    for (int n = 0; n <= NS; n++) begin
      cur = n;
      sample = 1; @(negedge clk); sample = 0;
      repeat (PERIOD - 1) @(negedge clk);
    end
    check(overrun == 3'b000, "programs fit 625 clocks per sample");
    check(mb == MAIN + SUB * P, $sformatf("lattice program length %0d", mb));
    check(pe_mb == PE_MAIN, $sformatf("excitation program length %0d", pe_mb));
    // two writes per pulse; the extra strobe that flushes the last output may add one pulse
    check(n_cwr == 2 * pulses || n_cwr == 2 * (pulses + 1), $sformatf("conditional writes %0d for %0d pulses", n_cwr, pulses));
    check(pulses > NFR, "pitch pulses occur");
    check(e2 > 1.0e6, "the synthesized signal is not silent");
    for (int n = 0; n < NS; n++)
      check(got[n + 1] && s_d[n + 1] == s_m[n], $sformatf("s[%0d] = %h want %h", n, s_d[n + 1], s_m[n]));
    $display("lpc synthesis: %0d samples, %0d pitch pulses, %0d and %0d of %0d clocks per sample, rms %0.1f LSB",
             NS, pulses, mb, pe_mb, PERIOD, $sqrt(e2 / NS));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat ((NS + 3) * PERIOD + 2000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
