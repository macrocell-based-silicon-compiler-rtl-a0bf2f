// mc_pkg: types and constants shared by the macrocell processors.
//
// The processors are horizontally microcoded: every clock cycle the microcode
// ROM delivers one control word (ctrl_t) whose fields drive the muxes,
// registers and memory of one processor directly. The field layout below is
// this design's own encoding; the fields mirror the controls a reader can see
// in the processor data path (shifter input mux, shift depth, complementor,
// coefficient-gated A mux, 3:1 B mux, ACC, MIR, memory cycle) plus the address
// arithmetic, FSM and serial/parallel I/O controls. An all-zero word is a NOP.
package mc_pkg;

  localparam int unsigned ADDR_W = 6;   // width of the microcode address field
  localparam int unsigned COND_W = 4;   // datapath condition bits fed to the FSM

  // memory cycle
  typedef enum logic [1:0] {MEM_NOP = 2'd0, MEM_RD = 2'd1, MEM_WR = 2'd2, MEM_CWR = 2'd3} mem_op_e;
  // address mode of the AAU
  typedef enum logic [1:0] {AM_DIR = 2'd0, AM_IX = 2'd1, AM_IY = 2'd2, AM_PTR = 2'd3} amode_e;
  // pointer register operation
  typedef enum logic [1:0] {PTR_HOLD = 2'd0, PTR_LOAD = 2'd1, PTR_ADD = 2'd2} ptr_op_e;
  // adder input A
  typedef enum logic [1:0] {A_ZERO = 2'd0, A_SHIFT = 2'd1, A_COEF0 = 2'd2, A_COEF1 = 2'd3} amux_e;
  // adder input B
  typedef enum logic [1:0] {B_ZERO = 2'd0, B_MOR = 2'd1, B_MBUS = 2'd2} bmux_e;
  // complementor
  typedef enum logic [1:0] {COMP_OFF = 2'd0, COMP_ON = 2'd1, COMP_DIV = 2'd2} comp_e;
  // MBUS source
  typedef enum logic [1:0] {MB_ACC = 2'd0, MB_MOR = 2'd1, MB_SIN = 2'd2, MB_SIG = 2'd3} mbus_e;
  // serial quotient output
  typedef enum logic [1:0] {Q_NONE = 2'd0, Q_FIRST = 2'd1, Q_BIT = 2'd2, Q_ONE = 2'd3} quot_e;

  typedef struct packed {
    mem_op_e             mem;      // memory cycle
    logic [ADDR_W-1:0]   addr;     // address / constant / channel field
    amode_e              amode;    // AAU address mode
    ptr_op_e             ptr;      // AAU pointer update
    logic                shsrc;    // shifter input: 0 = MOR, 1 = SOR
    logic [2:0]          shift;    // barrel shift depth 0..7 (arithmetic right)
    logic                sor_ld;   // load SOR from the shifter
    comp_e               comp;     // complementor control
    amux_e               amux;     // adder A input
    logic                coef_inv; // invert the coefficient bit (sign bit of k)
    bmux_e               bmux;     // adder B input
    logic                acc_ld;   // load ACC from the adder
    quot_e               quot;     // emit a quotient bit on serial port 'port'
    mbus_e               mbus;     // MBUS source
    logic                mir_ld;   // MIR captures MBUS
    logic                mir_tr;   // memory write takes MBUS directly (MIR transparent)
    logic                port;     // serial port number for so_*/si_*/MB_SIN/quot
    logic                so_ld;    // parallel-serial converter loads MBUS
    logic                so_sh;    // parallel-serial converter shifts out one bit
    logic                si_sh;    // serial-parallel converter shifts in one bit
    logic                sig_rd;   // signal data bus read strobe (channel = addr)
    logic                sig_wr;   // signal data bus write (MBUS driven, channel = addr)
    logic                fsm_step; // FSM takes its PLA next state
    logic [1:0]          fsm_in;   // two microcode bits presented to the PLA
    logic [1:0]          cw_bit;   // FSM state bit that conditions MEM_CWR
  } ctrl_t;

  localparam ctrl_t CW_NOP = '0;
  localparam int unsigned CW_W = $bits(ctrl_t);   // control word width

  // Datapath condition bits to the FSM PLA, in this order.
  localparam int unsigned C_NEG  = 0;  // ACC < 0
  localparam int unsigned C_ZERO = 1;  // ACC == 0
  localparam int unsigned C_SAT  = 2;  // the adder saturated on its last ACC load
  localparam int unsigned C_MAIN = 3;  // IX == -1 (main program)

endpackage
