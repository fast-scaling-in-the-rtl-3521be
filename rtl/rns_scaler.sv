// rns_scaler: scaling of a residue number system (RNS) operand by a constant.
//
// An RNS number X = {x_1..x_N}, x_i = <X>_{m_i}, is divided by a constant K
// and rounded down, Y = floor(X/K), with the result again in RNS form. K may
// be any constant coprime to all the moduli. The scheme needs a single base
// extension for the whole operand:
//
//   1. rns_base_extension computes <X>_K from all N residues
//      (T_R(N) + 2 lookup cycles, T_R(N) = ceil(log_R N));
//   2. in every channel, rns_scale_channel computes
//      y_i = < <x_i - <X>_K>_{m_i} * <K^-1>_{m_i} >_{m_i} (one lookup cycle).
//
// The residues x_i travel alongside the base extension in a delay line so
// that each channel sees x_i and <X>_K of the same operand. This structure,
// the formula of step 2 and the total of T_R(N) + 3 lookup cycles follow the
// published scheme; the way the base extension is done, the one-register-per-
// lookup-cycle pipelining and the valid signalling are this design's choices.
//
// CHANNEL_TABLES = 1 (default) builds each channel's scaling step as a stored
// table of 2^(clog2(K) + W) words, 64K words of 5 bits by default, as in a
// lookup-table implementation; 0 builds it as modular arithmetic. Both give
// the same results.
//
// Default configuration: moduli {23, 25, 27, 29, 31} (M = 13,956,975), K = 1039,
// R = 3 table inputs per lookup (tables of 64K words with 5-bit residues),
// giving a latency of ceil(log_3 5) + 3 = 5 clock cycles.
//
// Interface: x[i] is the residue modulo MODULI[i] and must be below it;
// y[i] likewise. in_valid marks an operand, out_valid its result.
// Timing: one operand per clock, no back-pressure; out_valid/y follow
// in_valid/x by LATENCY = T_R(N) + 3 clocks. rst_n (asynchronous, active low)
// clears only the valid pipeline.
module rns_scaler #(
  parameter int unsigned N          = 5,
  parameter rns_pkg::moduli_t MODULI = '{0: 23, 1: 25, 2: 27, 3: 29, 4: 31, default: 0},
  parameter int unsigned K          = 1039,
  parameter int unsigned R          = 3,
  parameter int unsigned W          = 5,
  parameter bit CHANNEL_TABLES      = 1'b1,
  localparam int unsigned LATENCY   = rns_pkg::clog_r(N, R) + 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [N-1:0][W-1:0]  x,
  output logic                 out_valid,
  output logic [N-1:0][W-1:0]  y
);

  localparam int unsigned KW     = (K > 1) ? $clog2(K) : 1;
  localparam int unsigned BE_LAT = LATENCY - 1;

  // ---- base extension -----------------------------------------------------
  logic          xk_valid;
  logic [KW-1:0] xk;

  rns_base_extension #(
    .N      (N),
    .MODULI (MODULI),
    .K      (K),
    .R      (R),
    .W      (W)
  ) u_be (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .x        (x),
    .out_valid(xk_valid),
    .xk       (xk)
  );

  // ---- residue delay line, aligned with the base extension ---------------
  logic [N-1:0][W-1:0] x_dly [BE_LAT];

  always_ff @(posedge clk) begin
    x_dly[0] <= x;
    for (int unsigned s = 1; s < BE_LAT; s++) x_dly[s] <= x_dly[s-1];
  end

  // ---- per-channel scaling lookups ------------------------------------------
  for (genvar i = 0; i < N; i++) begin : g_chan
    rns_scale_channel #(
      .MOD (MODULI[i]),
      .K   (K),
      .W   (W),
      .STORED_TABLE (CHANNEL_TABLES)
    ) u_scale (
      .clk (clk),
      .x   (x_dly[BE_LAT-1][i]),
      .xk  (xk),
      .y   (y[i])
    );

    // Operands must be proper residues.
    a_residue_range: assert property (
      @(posedge clk) disable iff (!rst_n) in_valid |-> (32'(x[i]) < MODULI[i]))
      else $error("rns_scaler: x[%0d]=%0d is not below its modulus %0d", i, x[i], MODULI[i]);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= xk_valid;

endmodule
