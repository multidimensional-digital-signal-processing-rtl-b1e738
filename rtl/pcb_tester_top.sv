// PCB tester: digital part of a board test system that replaces the
// analog-to-digital converters of the observed nodes by rate-of-change codes.
//
// The test signal generator (TSG) drives all N stimulus nodes of the board
// at once. Outside this module, each of the K observed nodes feeds a
// differentiator and amplifiers; their output, the rate of change of the
// node voltage, enters here as the sign-magnitude word du[j]. K fuzzy logic
// units turn the K rates into 3-bit approximation codes in parallel. The
// synchronisation block (SYN) strobes the codes of all K nodes into the code
// store (SAP) once per sampling step T, a fixed delay after each stimulus
// step, and the store streams the words to the host PC. The host rebuilds
// each node's waveform by summing its codes, u_j(nT) = sum code_j(m) * delta.
//
// Word layout on pc_data: bits [3j+2:3j] hold the code {sign, rate[1:0]} of
// observed node j+1. The block structure (TSG -> board -> differentiators ->
// fuzzy units -> SAP, with SYN between TSG and SAP) follows the method;
// the host ports, word layout and status outputs are this design's own.
//
// Timing: see tsg, syn and sap. With cfg_delay = D (D < cfg_period), the
// word stored for step n holds the codes present in the clock cycle that
// comes D + 2 cycles after the one in which word n first drives u_in. A
// frame of L words at period P ends with frame_end high in the cycle that
// comes L*P + 3 cycles after the cycle in which start is high.
module pcb_tester_top
  import pcbt_pkg::*;
#(
  parameter int unsigned N           = N_IN,   // stimulus nodes
  parameter int unsigned K           = K_OUT,  // observed nodes
  parameter int unsigned DU_W        = 4,      // rate word width
  parameter int unsigned STEP        = 2,      // discretisation step, LSB of |du|
  parameter int unsigned PAT_DEPTH   = 256,    // stimulus pattern words
  parameter int unsigned STACK_DEPTH = 1024,   // code store words
  parameter int unsigned DIV_W       = 16,     // width of period and delay
  localparam int unsigned PAW        = $clog2(PAT_DEPTH),
  localparam int unsigned SAW        = $clog2(STACK_DEPTH),
  localparam int unsigned W          = K * CODE_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // host: stimulus pattern and configuration
  input  logic                      pat_we,
  input  logic [PAW-1:0]            pat_addr,
  input  logic [N-1:0]              pat_wdata,
  input  logic [DIV_W-1:0]          cfg_period,
  input  logic [PAW:0]              cfg_len,
  input  logic [DIV_W-1:0]          cfg_delay,
  input  logic                      start,
  input  logic                      clear,
  // to the board under test
  output logic [N-1:0]              u_in,
  // from the differentiators and amplifiers of the observed nodes
  input  logic [K-1:0][DU_W-1:0]    du,
  // to the host
  output logic [W-1:0]              pc_data,
  output logic                      pc_valid,
  input  logic                      pc_ready,
  // status
  output logic                      busy,
  output logic                      frame_start,
  output logic                      frame_end,
  output logic [15:0]               sample_n,
  output logic [15:0]               missed,
  output logic [SAW:0]              level,
  output logic                      overflow
);

  logic                 step;
  logic                 store;
  apx_code_t [K-1:0]    y;

  tsg #(.N(N), .DEPTH(PAT_DEPTH), .DIV_W(DIV_W)) u_tsg (
    .clk, .rst_n,
    .pat_we, .pat_addr, .pat_wdata,
    .cfg_period, .cfg_len, .start,
    .u_in, .step, .busy
  );

  syn #(.DLY_W(DIV_W), .CNT_W(16)) u_syn (
    .clk, .rst_n,
    .step, .busy, .cfg_delay,
    .store, .frame_start, .frame_end, .sample_n, .missed
  );

  for (genvar j = 0; j < K; j++) begin : g_fuzzy
    fuzzy_unit #(.DU_W(DU_W), .STEP(STEP)) u_fuzzy (
      .du (du[j]),
      .y  (y[j])
    );
  end

  sap #(.W(W), .DEPTH(STACK_DEPTH)) u_sap (
    .clk, .rst_n, .clear,
    .store, .codes (y),
    .pc_data, .pc_valid, .pc_ready,
    .level, .overflow
  );

endmodule
