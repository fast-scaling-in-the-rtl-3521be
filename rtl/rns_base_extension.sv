// rns_base_extension: exact base extension of an RNS number to the modulus K.
//
// Given the residues x_i = <X>_{m_i} of an integer 0 <= X < M, the unit
// produces <X>_K, the first step of scaling by K. What the unit computes is
// the design's; how it computes it is this design's own choice, since any
// exact base extension serves. It uses the Chinese remainder theorem laid
// out as a lookup network of the same shape as the generic r-ary tree:
//
//   lookup cycle 1      one table per channel:   v_i = <x_i * <M_i^-1>_{m_i}>_{m_i} * M_i
//                       (each v_i < M, since the first factor is below m_i)
//   cycles 2..T+1       rns_lut_tree adds the v_i modulo M in
//                       T = ceil(log_R N) levels, giving X itself
//   cycle T+2           one table reduces X modulo K
//
// so the unit takes T_R(N) + 2 lookup cycles, the same exact time complexity
// as the base extension the design was costed with. The tree carries full
// log2(M)-bit words between levels rather than channel-width residues; this
// keeps the extension exact for every X with no redundant channel.
//
// Interface: x packs the N residues, x[i] for modulus MODULI[i] (only the
// first N entries of MODULI are used); each residue must be
// below its modulus. xk is <X>_K.
// Timing: fully pipelined, one operand per clock, out_valid/xk follow
// in_valid/x by LATENCY = T_R(N) + 2 clocks. Only the valid pipeline is
// reset (asynchronous, active low).
module rns_base_extension #(
  parameter int unsigned N             = 5,
  parameter rns_pkg::moduli_t MODULI    = '{0: 23, 1: 25, 2: 27, 3: 29, 4: 31, default: 0},
  parameter int unsigned K             = 1039,
  parameter int unsigned R             = 3,
  parameter int unsigned W             = 5,
  localparam int unsigned KW           = (K > 1) ? $clog2(K) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [N-1:0][W-1:0]  x,
  output logic                 out_valid,
  output logic [KW-1:0]        xk
);
  import rns_pkg::*;

  function automatic wide_t dynamic_range();
    wide_t p;
    p = 1;
    for (int unsigned i = 0; i < N; i++) p = p * wide_t'(MODULI[i]);
    return p;
  endfunction

  localparam wide_t       M  = dynamic_range();
  localparam int unsigned MW = bits_for(M - 1);

  if (N < 1 || N > MAX_N) begin : g_bad_n
    $error("rns_base_extension: N=%0d outside 1..%0d", N, MAX_N);
  end

  // ---- lookup cycle 1: per-channel weighted residues -------------------
  logic [N-1:0][MW-1:0] v_q;
  logic                 v_valid_q;

  for (genvar i = 0; i < N; i++) begin : g_chan
    localparam int unsigned MOD_I  = MODULI[i];
    localparam wide_t       BIG_MI = M / wide_t'(MOD_I);                       // M_i
    localparam int unsigned MI_RED = int'(BIG_MI % wide_t'(MOD_I));            // <M_i>_{m_i}
    localparam int unsigned MI_INV = mod_inverse(MI_RED, MOD_I);               // <M_i^-1>_{m_i}
    localparam int unsigned TW     = $clog2(MOD_I) + W + 1;

    if (MOD_I < 2 || MOD_I > (1 << W)) begin : g_bad_mod
      $error("rns_base_extension: modulus %0d does not fit in %0d bits", MOD_I, W);
    end
    if (gcd(K, MOD_I) != 1) begin : g_bad_k
      $error("rns_base_extension: K=%0d is not coprime to modulus %0d", K, MOD_I);
    end
    for (genvar j = i + 1; j < N; j++) begin : g_pair
      if (gcd(MODULI[i], MODULI[j]) != 1) begin : g_bad_pair
        $error("rns_base_extension: moduli %0d and %0d are not coprime", MODULI[i], MODULI[j]);
      end
    end

    logic [TW-1:0] prod;
    logic [W-1:0]  t;
    always_comb begin
      prod = TW'(x[i]) * TW'(MI_INV);
      t    = W'(prod % TW'(MOD_I));
    end

    always_ff @(posedge clk) v_q[i] <= MW'(t) * MW'(BIG_MI);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) v_valid_q <= 1'b0;
    else        v_valid_q <= in_valid;

  // ---- lookup cycles 2..T+1: sum modulo M --------------------------------
  logic          x_valid;
  logic [MW-1:0] x_bin;

  rns_lut_tree #(
    .N   (N),
    .R   (R),
    .DW  (MW),
    .MOD (MW'(M))
  ) u_tree (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (v_valid_q),
    .in_data  (v_q),
    .out_valid(x_valid),
    .out_data (x_bin)
  );

  // ---- lookup cycle T+2: reduce modulo K ---------------------------------
  always_ff @(posedge clk) xk <= KW'(x_bin % MW'(K));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= x_valid;

endmodule
