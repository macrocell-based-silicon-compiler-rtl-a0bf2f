// mc_prog_pkg: default microprograms of the four-processor chip.
//
// The processors are dedicated to one algorithm each and start together on
// the sample strobe, so bit-serial transfers between them are scheduled
// statically: the sender shifts a bit in the same clock in which the receiver
// takes it. The demonstration algorithm, per sample (Q15 fractions):
//   P4  pulls gain g from the host interface (cycles 0-15) and sends it,
//       MSB first, to P1's coefficient input (cycles 20-35)
//   P1  reads x from signal-bus channel 0, y = g*x by the bit-serial
//       variable-coefficient multiply, writes y to channel 1, keeps y in MIR
//       for a later free memory cycle, sends y to P2 (37-52), and writes the
//       peak it gets back from P2 (76-91) to channel 2
//   P2  z = 0.75*y as the signed-digit sum y - y/4; peak = max(peak, z) by
//       an FSM-conditioned write; sends z to P3 (59-74), peak to P1 (76-91)
//   P3  stores z in a 4-entry circular buffer indexed by IY, sends z / 0.75
//       (non-restoring divide, read-only constant 0.75) as a serial
//       two's-complement quotient to the host interface (79-94), sums the
//       buffer in a 4-iteration subprogram indexed by IX and sends the sum to
//       the host interface at the start of the next sample (1-16)
// The longest program (P3) takes 96 + 4*3 = 108 cycles, so the sample
// interval must be at least 109 clocks. The algorithm is this design's own
// example; the document gives no microcode.
package mc_prog_pkg;
  import mc_pkg::*;

  localparam int unsigned ROM_DEPTH = 256;
  localparam int unsigned RAM_DEPTH = 64;
  typedef logic [ROM_DEPTH-1:0][CW_W-1:0] prog_t;   // ROM image, word i at [i]

  localparam int unsigned P1_MAIN = 93;
  localparam int unsigned P2_MAIN = 92;
  localparam int unsigned P3_MAIN = 96;
  localparam int unsigned P3_SUB  = 3;
  localparam int unsigned P3_ITER = 4;
  localparam int unsigned P4_MAIN = 36;
  localparam int unsigned P3_BUF  = 8;      // circular buffer base address
  localparam int unsigned P3_DIV  = 20;     // read-only divisor constant
  localparam logic [15:0] P3_DIVISOR = 16'h6000;  // 0.75

  // Each control word is built from the all-zero NOP by setting fields; the
  // prog_pN functions below fill a ROM image address by address.

  function automatic ctrl_t p1_word(input int i);
    ctrl_t c = CW_NOP;
    if (i == 0) begin                   // x from signal bus channel 0 to word 0
      c.sig_rd = 1'b1; c.mbus = MB_SIG; c.mir_tr = 1'b1; c.mem = MEM_WR;
    end
    if (i == 1) c.mem = MEM_RD;         // MOR <= x
    if (i == 2) c.sor_ld = 1'b1;        // SOR <= MOR
    if (i == 19) begin                  // ACC <= -A
      c.amux = A_SHIFT; c.comp = COMP_ON; c.acc_ld = 1'b1;
    end
    if (i >= 20 && i <= 35) begin       // ACC += k-bit * SOR, SOR >>= 1
      c.amux = A_COEF0; c.coef_inv = (i == 20);
      c.bmux = B_MBUS; c.mbus = MB_ACC; c.acc_ld = 1'b1;
      c.shsrc = 1'b1; c.shift = 3'd1; c.sor_ld = 1'b1;
    end
    if (i == 36) begin                  // y: channel 1, to P2, held in MIR
      c.mbus = MB_ACC; c.sig_wr = 1'b1; c.addr = 6'd1; c.so_ld = 1'b1; c.mir_ld = 1'b1;
    end
    if (i >= 37 && i <= 52) c.so_sh = 1'b1;
    if (i == 37) begin c.mem = MEM_WR; c.addr = 6'd1; end   // MIR -> word 1
    if (i >= 76 && i <= 91) c.si_sh = 1'b1;                 // peak from P2
    if (i == 92) begin c.mbus = MB_SIN; c.sig_wr = 1'b1; c.addr = 6'd2; end
    return c;
  endfunction

  function automatic ctrl_t p2_word(input int i);
    ctrl_t c = CW_NOP;
    if (i >= 37 && i <= 52) c.si_sh = 1'b1;                 // y from P1
    if (i == 53) begin c.mbus = MB_SIN; c.mir_tr = 1'b1; c.mem = MEM_WR; end
    if (i == 54) c.mem = MEM_RD;
    if (i == 55) c.sor_ld = 1'b1;                           // SOR <= y
    if (i == 56) begin                                      // ACC <= y, SOR <= y/4
      c.amux = A_SHIFT; c.acc_ld = 1'b1; c.sor_ld = 1'b1; c.shift = 3'd2;
    end
    if (i == 57 || i == 62) begin                           // ACC <= ACC - SOR
      c.amux = A_SHIFT; c.comp = COMP_ON; c.bmux = B_MBUS; c.acc_ld = 1'b1;
    end
    if (i == 58) begin c.mbus = MB_ACC; c.mir_ld = 1'b1; c.so_ld = 1'b1; c.port = 1'b1; end
    if (i >= 59 && i <= 74) begin c.so_sh = 1'b1; c.port = 1'b1; end   // z to P3
    if (i == 59) begin c.mem = MEM_WR; c.addr = 6'd1; end   // z from MIR
    if (i == 60 || i == 65) begin c.mem = MEM_RD; c.addr = 6'd2; end   // peak
    if (i == 61) c.sor_ld = 1'b1;
    if (i == 63) c.fsm_step = 1'b1;                         // s1 <= (z - peak >= 0)
    if (i == 64) begin c.mem = MEM_CWR; c.addr = 6'd2; c.cw_bit = 2'd1; end
    if (i == 75) begin c.mbus = MB_MOR; c.so_ld = 1'b1; end
    if (i >= 76 && i <= 91) c.so_sh = 1'b1;                 // peak to P1
    return c;
  endfunction

  function automatic ctrl_t p3_word(input int i);
    ctrl_t c = CW_NOP;
    if (i == 0) begin c.mbus = MB_ACC; c.so_ld = 1'b1; end  // last buffer sum
    if (i >= 1 && i <= 16) c.so_sh = 1'b1;
    if (i >= 59 && i <= 74) c.si_sh = 1'b1;                 // z from P2
    if (i == 75) begin                                      // buf[IY] <= z
      c.mbus = MB_SIN; c.mir_tr = 1'b1; c.mem = MEM_WR; c.addr = 6'(P3_BUF); c.amode = AM_IY;
    end
    if (i == 76) begin c.mem = MEM_RD; c.addr = 6'(P3_DIV); end
    if (i == 77) begin                                      // SOR <= D/2, MOR <= z
      c.sor_ld = 1'b1; c.shift = 3'd1; c.mem = MEM_RD; c.addr = 6'(P3_BUF); c.amode = AM_IY;
    end
    if (i == 78) begin c.bmux = B_MOR; c.acc_ld = 1'b1; end // ACC <= z
    if (i >= 79 && i <= 93) begin                           // divide steps
      c.shsrc = 1'b1; c.shift = 3'd1; c.sor_ld = 1'b1;
      c.comp = COMP_DIV; c.amux = A_SHIFT; c.bmux = B_MBUS; c.acc_ld = 1'b1;
      c.quot = (i == 79) ? Q_FIRST : Q_BIT;
    end
    if (i == 94) c.quot = Q_ONE;
    if (i == 95) c.acc_ld = 1'b1;                           // ACC <= 0
    // subprogram: ACC += buf[IX]
    if (i == int'(P3_MAIN)) begin c.mem = MEM_RD; c.addr = 6'(P3_BUF); c.amode = AM_IX; end
    if (i == int'(P3_MAIN) + 1) c.sor_ld = 1'b1;
    if (i == int'(P3_MAIN) + 2) begin c.amux = A_SHIFT; c.bmux = B_MBUS; c.acc_ld = 1'b1; end
    return c;
  endfunction

  function automatic ctrl_t p4_word(input int i);
    ctrl_t c = CW_NOP;
    if (i <= 15) c.si_sh = 1'b1;                            // g from host interface
    if (i == 16) begin c.mbus = MB_SIN; c.so_ld = 1'b1; c.mir_tr = 1'b1; c.mem = MEM_WR; end
    if (i >= 20 && i <= 35) c.so_sh = 1'b1;                 // g to P1 COEF0
    return c;
  endfunction

  function automatic prog_t prog_p1();
    prog_t p;
    for (int i = 0; i < int'(ROM_DEPTH); i++) p[i] = p1_word(i);
    return p;
  endfunction
  function automatic prog_t prog_p2();
    prog_t p;
    for (int i = 0; i < int'(ROM_DEPTH); i++) p[i] = p2_word(i);
    return p;
  endfunction
  function automatic prog_t prog_p3();
    prog_t p;
    for (int i = 0; i < int'(ROM_DEPTH); i++) p[i] = p3_word(i);
    return p;
  endfunction
  function automatic prog_t prog_p4();
    prog_t p;
    for (int i = 0; i < int'(ROM_DEPTH); i++) p[i] = p4_word(i);
    return p;
  endfunction

  function automatic logic [15:0] p3_consts_at(input int a);
    return (a == int'(P3_DIV)) ? P3_DIVISOR : 16'h0000;
  endfunction

  typedef logic [RAM_DEPTH-1:0][15:0] consts_t;
  function automatic consts_t p3_consts();
    consts_t c;
    for (int a = 0; a < int'(RAM_DEPTH); a++) c[a] = p3_consts_at(a);
    return c;
  endfunction
endpackage
