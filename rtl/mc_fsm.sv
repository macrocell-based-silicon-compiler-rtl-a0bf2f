// mc_fsm: PLA-based finite state machine of one macrocell processor.
//
// The processor has no branches; decisions are made by this FSM, an adjunct to
// the data path whose state bits stand for logical values of the algorithm.
// Its next state comes from a two-level PLA: NT product terms (AND plane,
// given as a care mask and a value per term) over the input vector
// {ctl[1:0], cond[3:0], state[NS-1:0]}, ORed per state bit (OR plane). The
// condition bits are ACC < 0, ACC == 0, adder saturated and main program
// (see mc_pkg C_*); ctl is a two-bit microcode field. The state register takes
// the PLA output in cycles whose control word sets 'step'. 'cw_en' is the
// state bit picked by the control word's cw_bit field and enables a
// conditional write to data memory. The PLA as the FSM's form, its
// programming and the conditional write follow the document; the input set
// and the step command are this design's choice. The default personality:
// s0 <= ACC<0, s1 <= ACC>=0, s2 <= saturated (sticky), s3 <= ACC==0.
module mc_fsm #(
  parameter int unsigned NS  = 4,
  parameter int unsigned NT  = 8,
  localparam int unsigned NIN = NS + mc_pkg::COND_W + 2,
  parameter logic [NT-1:0][NIN-1:0] AND_CARE = {
      NIN'(0), NIN'(0), NIN'(0),
      NIN'(1) << (NS + mc_pkg::C_ZERO),
      NIN'(1) << 2,
      NIN'(1) << (NS + mc_pkg::C_SAT),
      NIN'(1) << (NS + mc_pkg::C_NEG),
      NIN'(1) << (NS + mc_pkg::C_NEG)},
  parameter logic [NT-1:0][NIN-1:0] AND_VAL = {
      NIN'(0), NIN'(0), NIN'(0),
      NIN'(1) << (NS + mc_pkg::C_ZERO),
      NIN'(1) << 2,
      NIN'(1) << (NS + mc_pkg::C_SAT),
      NIN'(0),
      NIN'(1) << (NS + mc_pkg::C_NEG)},
  parameter logic [NS-1:0][NT-1:0] OR_PLANE = {
      NT'(8'b0001_0000), NT'(8'b0000_1100), NT'(8'b0000_0010), NT'(8'b0000_0001)}
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [mc_pkg::COND_W-1:0] cond,
  input  logic                      step,
  input  logic [1:0]                ctl,
  input  logic [1:0]                cw_bit,
  output logic [NS-1:0]             state,
  output logic                      cw_en
);
  logic [NIN-1:0] pla_in;
  logic [NT-1:0]  term;
  logic [NS-1:0]  next;

  assign pla_in = {ctl, cond, state};

  always_comb begin
    for (int t = 0; t < NT; t++)
      term[t] = ((pla_in ^ AND_VAL[t]) & AND_CARE[t]) == '0 && AND_CARE[t] != '0;
    for (int s = 0; s < NS; s++)
      next[s] = |(term & OR_PLANE[s]);
  end

  always_ff @(posedge clk) begin
    if (rst)       state <= '0;
    else if (step) state <= next;
  end

  assign cw_en = (32'(cw_bit) < NS) ? state[cw_bit] : 1'b0;
endmodule
