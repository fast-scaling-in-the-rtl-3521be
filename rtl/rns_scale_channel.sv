// rns_scale_channel: the scaling lookup of one RNS channel.
//
// Once <X>_K is known, X - <X>_K is an exact multiple of K, and because K is
// coprime to the channel modulus m the scaled residue follows directly:
//
//   y = < <x - <X>_K>_m * <K^-1>_m >_m        ( = <floor(X/K)>_m )
//
// The two inputs x and <X>_K address one table per channel in a lookup
// implementation. STORED_TABLE selects how the function is built:
//   1 (default): as a table of 2^TABLE_AW words addressed by {<X>_K, x},
//      filled when the design is loaded (a ROM; unused addresses hold 0):
//      each row <X>_K starts at the value of the arithmetic form for x = 0
//      and steps by <K^-1>_m modulo m as x increases. TABLE_AW = clog2(K) + W is the table's address width: 16 bits
//      (64K words) for the 5-bit, K = 1039 default, 15 bits (32K words) for
//      each of the larger configurations the scheme was costed with;
//   0: as logic, a subtraction and a multiplication modulo m, which the
//      scheme allows as an alternative to a stored table.
// In both, <X>_K may exceed m, so it is first reduced modulo m.
// <K^-1>_m is computed while the design is elaborated.
//
// Interface: x < MOD is the channel's residue of X, xk < K is <X>_K, y is the
// channel's residue of floor(X/K).
// Timing: one lookup cycle: y is registered and follows x/xk by one clock.
// The register is not reset; the enclosing pipeline qualifies it with a valid
// bit.
module rns_scale_channel #(
  parameter int unsigned MOD = 23,
  parameter int unsigned K   = 1039,
  parameter int unsigned W   = 5,
  parameter bit STORED_TABLE = 1'b1,
  localparam int unsigned KW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned TABLE_AW = KW + W
) (
  input  logic          clk,
  input  logic [W-1:0]  x,
  input  logic [KW-1:0] xk,
  output logic [W-1:0]  y
);

  localparam int unsigned KINV = rns_pkg::mod_inverse(K, MOD);   // <K^-1>_m
  localparam int unsigned PW   = 2 * W + 1;
  localparam int unsigned RW   = (KW > W) ? KW : W;

  if (KINV == 0) begin : g_bad_k
    $error("rns_scale_channel: K=%0d has no inverse modulo %0d", K, MOD);
  end

  // y as a function of the two inputs, shared by both forms.
  function automatic logic [W-1:0] scale(logic [W-1:0] xv, logic [KW-1:0] kv);
    logic [W-1:0]  xk_m;   // <<X>_K>_m
    logic [W:0]    diff;   // x - <X>_K, before the wrap into [0, m)
    logic [W-1:0]  d;      // <x - <X>_K>_m
    logic [PW-1:0] prod;
    xk_m = W'(RW'(kv) % RW'(MOD));
    diff = {1'b0, xv} - {1'b0, xk_m};
    d    = diff[W] ? W'(diff + (W+1)'(MOD)) : diff[W-1:0];
    prod = PW'(d) * PW'(KINV);
    return W'(prod % PW'(MOD));
  endfunction

  logic [W-1:0] y_d;

  if (STORED_TABLE) begin : g_table
    logic [W-1:0] table_q [2**TABLE_AW];

    // Row <X>_K = kv starts at scale(0, kv); along the row each step of x
    // adds <K^-1>_m modulo m.
    initial begin
      logic [W:0] yv;
      table_q = '{default: '0};
      for (int unsigned kv = 0; kv < K; kv++) begin
        yv = {1'b0, scale('0, KW'(kv))};
        for (int unsigned xv = 0; xv < MOD; xv++) begin
          table_q[TABLE_AW'((kv << W) | xv)] = yv[W-1:0];
          yv = yv + (W+1)'(KINV);
          if (yv >= (W+1)'(MOD)) yv = yv - (W+1)'(MOD);
        end
      end
    end

    assign y_d = table_q[{xk, x}];
  end else begin : g_logic
    assign y_d = scale(x, xk);
  end

  always_ff @(posedge clk) y <= y_d;

endmodule
