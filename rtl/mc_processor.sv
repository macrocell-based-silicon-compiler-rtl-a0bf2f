// mc_processor: one microprogrammed signal processor built from macrocells.
//
// PC, SPC and ROM form the control sequencer: on each sample strobe the PC
// runs the main program once, then the SPC runs the subprogram N_ITER times,
// then the processor idles on NOP words until the next strobe. Together with
// the AAU they present one horizontal control word and one data address per
// clock to the AUIO (data path and I/O ports), the RAM (data memory) and the
// FSM (PLA-based decision logic, which conditions writes to memory). There are
// no branches. SPC, AAU and FSM are optional, as in the document: with
// N_ITER = 0 there is no subprogram, with HAS_AAU = 0 the address field is the
// memory address, with HAS_FSM = 0 conditional writes never happen.
// AAU_IX, AAU_IY and AAU_PTR likewise leave out address modes a program
// does not use.
// 'overrun' is set (sticky) if a sample strobe arrives while the program is
// still running, i.e. the program does not fit the sample interval; this flag
// is this design's addition.
module mc_processor #(
  parameter int unsigned W         = 16,
  parameter int unsigned ROM_DEPTH = 256,
  parameter int unsigned PAW       = 8,
  parameter int unsigned MAIN_LEN  = 16,
  parameter int unsigned SUB_LEN   = 4,
  parameter int unsigned N_ITER    = 4,
  parameter int unsigned RAM_DEPTH = 64,
  parameter int unsigned IY_MOD    = 4,
  parameter int unsigned N_SIN     = 2,
  parameter int unsigned N_SOUT    = 2,
  parameter bit          HAS_AAU   = 1'b1,
  parameter bit          AAU_IX    = 1'b1,
  parameter bit          AAU_IY    = 1'b1,
  parameter bit          AAU_PTR   = 1'b1,
  parameter bit          HAS_FSM   = 1'b1,
  parameter logic [ROM_DEPTH-1:0][mc_pkg::CW_W-1:0] PROGRAM = '0,
  parameter logic [RAM_DEPTH-1:0] RO_MASK = '0,
  parameter logic [RAM_DEPTH-1:0][W-1:0] CONSTS = '0,
  localparam int unsigned AW = mc_pkg::ADDR_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              sample,
  input  logic [1:0]        coef,
  input  logic [N_SIN-1:0]  sin,
  output logic [N_SIN-1:0]  sin_req,
  output logic [N_SOUT-1:0] sout,
  output logic [N_SOUT-1:0] sout_vld,
  input  logic [W-1:0]      sig_din,
  output logic [W-1:0]      sig_dout,
  output logic              sig_oe,
  output logic              sig_rd,
  output logic [AW-1:0]     sig_chan,
  output logic              busy,
  output logic              overrun
);
  import mc_pkg::*;

  logic           pc_active, pc_start, pc_done;
  logic [PAW-1:0] pc_addr, spc_addr;
  logic           spc_active, iter_start;
  ctrl_t          cw;
  logic [AW-1:0]  ea;
  logic           in_main;
  logic [2:0]     dp_cond;
  logic           cw_en;
  logic           mem_we;
  logic [W-1:0]   mem_wdata, mem_rdata;
  logic [W-1:0]   acc_q;

  mc_pc #(.MAIN_LEN(MAIN_LEN), .PAW(PAW)) u_pc (
    .clk, .rst, .sample, .active(pc_active), .start(pc_start), .done(pc_done), .addr(pc_addr));

  if (N_ITER > 0) begin : g_spc
    logic [7:0] iter;
    mc_spc #(.SUB_LEN(SUB_LEN), .N_ITER(N_ITER), .PAW(PAW)) u_spc (
      .clk, .rst, .go(pc_done), .active(spc_active), .iter_start(iter_start),
      .addr(spc_addr), .iter(iter));
  end else begin : g_no_spc
    assign spc_active = 1'b0;
    assign iter_start = 1'b0;
    assign spc_addr   = '0;
  end

  mc_rom #(.DEPTH(ROM_DEPTH), .PAW(PAW), .MAIN_LEN(MAIN_LEN), .PROGRAM(PROGRAM)) u_rom (
    .pc_active, .pc_addr, .spc_active, .spc_addr, .cw);

  if (HAS_AAU) begin : g_aau
    logic signed [8:0] ix;
    logic [AW-1:0]     iy;
    mc_aau #(.DEPTH(RAM_DEPTH), .IY_MOD(IY_MOD), .USE_IX(AAU_IX), .USE_IY(AAU_IY), .USE_PTR(AAU_PTR)) u_aau (
      .clk, .rst, .sample, .pc_active, .iter_start, .field(cw.addr), .amode(cw.amode),
      .ptr_op(cw.ptr), .ea, .in_main, .ix, .iy);
  end else begin : g_no_aau
    assign ea      = cw.addr;
    assign in_main = pc_active;
  end

  if (HAS_FSM) begin : g_fsm
    logic [3:0] state;
    mc_fsm u_fsm (
      .clk, .rst, .cond({in_main, dp_cond}), .step(cw.fsm_step), .ctl(cw.fsm_in),
      .cw_bit(cw.cw_bit), .state, .cw_en);
  end else begin : g_no_fsm
    assign cw_en = 1'b0;
  end

  mc_auio #(.W(W), .N_SIN(N_SIN), .N_SOUT(N_SOUT), .N_COEF(2)) u_auio (
    .clk, .rst, .cw, .mem_rdata, .mem_we, .mem_wdata, .cw_en, .cond(dp_cond),
    .coef, .sin, .sin_req, .sout, .sout_vld,
    .sig_din, .sig_dout, .sig_oe, .sig_rd, .sig_chan, .acc_q);

  mc_ram #(.W(W), .DEPTH(RAM_DEPTH), .RO_MASK(RO_MASK), .CONSTS(CONSTS)) u_ram (
    .clk, .rst, .addr(ea), .we(mem_we), .wdata(mem_wdata), .rdata(mem_rdata));

  assign busy = pc_active || spc_active;

  always_ff @(posedge clk) begin
    if (rst)                 overrun <= 1'b0;
    else if (sample && busy) overrun <= 1'b1;
  end
endmodule
