// rns_lut_tree: r-ary lookup tree that reduces N operands to one value.
//
// This is the generic structure behind every O(log_r N) residue arithmetic
// process of the form Y = sum_j f(x_j): when each lookup table can take at
// most R inputs, N operands are combined in a tree of exactly
// LEVELS = ceil(log_R N) lookup cycles using ceil((N-1)/(R-1)) tables, the
// published time and space counts. Consecutive items are grouped R at a
// time. A level combines only as many items as the remaining levels cannot
// absorb (rns_pkg::tree_tables) and passes the others through a register,
// so every table but possibly one per level is fully used; drawing the tree
// with ceil(N/R^l) tables in level l gives the same depth with a few more
// tables. NUM_TABLES reports the count. The node function is this design's
// choice: each node adds its (up to R) inputs modulo the constant MOD, which
// is what the base-extension unit needs. A node is written as logic (an adder followed by
// R-1 conditional subtractions of MOD) rather than as a stored table; its
// input/output behaviour is that of the R-input table it stands for.
//
// Interface: in_data holds N operands, each already below MOD. out_data is
// <sum of all operands>_MOD.
// Timing: one register per lookup cycle, so out_valid/out_data follow
// in_valid/in_data by LEVELS clock cycles, one new operand set per clock.
// With N = 1 there is no level and the output is the input, unregistered.
// Only the valid pipeline is reset (asynchronous, active low); data registers
// are not reset because their contents are ignored while invalid.
module rns_lut_tree #(
  parameter int unsigned N  = 5,
  parameter int unsigned R  = 3,
  parameter int unsigned DW = 24,
  parameter logic [DW-1:0] MOD = DW'(13956975),   // 23*25*27*29*31
  localparam int unsigned LEVELS     = rns_pkg::clog_r(N, R),
  localparam int unsigned NUM_TABLES = rns_pkg::tree_total(N, R)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [N-1:0][DW-1:0]  in_data,
  output logic                  out_valid,
  output logic [DW-1:0]         out_data
);

  // Width of a node's running sum: R operands below MOD.
  localparam int unsigned SW = DW + $clog2(R) + 1;

  if (R < 2) begin : g_bad_r
    $error("rns_lut_tree: R must be at least 2");
  end

  for (genvar l = 1; l <= LEVELS; l++) begin : g_level
    localparam int unsigned NIN  = rns_pkg::tree_items(N, R, l - 1);
    localparam int unsigned G    = rns_pkg::tree_tables(N, R, l);
    localparam int unsigned NOUT = rns_pkg::tree_items(N, R, l);

    logic [NIN-1:0][DW-1:0]  src;   // items of the previous level
    logic [NOUT-1:0][DW-1:0] node;  // registered items of this level

    if (l == 1) begin : g_src_in
      assign src = in_data;
    end else begin : g_src_prev
      assign src = g_level[l-1].node;
    end

    // Tables: item j of this level combines items j*R .. j*R+R-1.
    for (genvar j = 0; j < G; j++) begin : g_node
      localparam int unsigned FIRST = j * R;
      localparam int unsigned LAST  = (FIRST + R < NIN) ? FIRST + R : NIN;
      logic [DW-1:0] sum;

      always_comb begin
        logic [SW-1:0] acc;
        acc = '0;
        for (int unsigned k = FIRST; k < LAST; k++) acc = acc + SW'(src[k]);
        for (int unsigned k = 1; k < R; k++)
          if (acc >= SW'(MOD)) acc = acc - SW'(MOD);
        sum = acc[DW-1:0];
      end

      always_ff @(posedge clk) node[j] <= sum;
    end

    // Items not combined at this level are only delayed.
    for (genvar k = G * R; k < NIN; k++) begin : g_pass
      always_ff @(posedge clk) node[G + k - G * R] <= src[k];
    end
  end

  logic [LEVELS:0] vpipe;
  assign vpipe[0] = in_valid;
  for (genvar l = 1; l <= LEVELS; l++) begin : g_valid
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) vpipe[l] <= 1'b0;
      else        vpipe[l] <= vpipe[l-1];
  end

  assign out_valid = vpipe[LEVELS];
  if (LEVELS == 0) begin : g_out_direct
    assign out_data = in_data[0];
  end else begin : g_out_tree
    assign out_data = g_level[LEVELS].node[0];
  end

endmodule
