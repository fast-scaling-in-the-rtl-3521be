// tb_rns_scaler_table1: runs the scaler in the three larger configurations
// the scheme was costed with (tables of 32K words, so R = floor(15 / width)
// and K at most 15 - width bits):
//
//   6 moduli {17,19,23,27,29,31},                5-bit, R = 3, K = 1021 (10 bits)
//   8 moduli {37,41,43,47,53,59,61,63},          6-bit, R = 2, K = 509  (9 bits)
//  12 moduli {67,71,73,79,83,89,97,101,103,107,109,113},
//                                                 7-bit, R = 2, K = 251  (8 bits)
//
// The expected latencies 5, 6 and 7 cycles are the published lookup-cycle
// counts T_R(N) + 3 for these sets. The K values are primes of the largest
// allowed width, chosen here. Every result is checked against floor(X/K)
// computed in binary. The channel lookups are built as stored tables for the
// 6- and 12-moduli sets and as arithmetic for the 8-moduli set; each table
// would have 15 address bits (a 32K-word table).
module tb_rns_scaler_table1;
  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  // ---- 6 moduli ----
  logic a_iv, a_ov, a_done;
  logic [5:0][4:0] a_x, a_y;
  int a_c, a_f, a_w, a_k, a_a, a_b, a_i;
  rns_scaler #(.N(6), .MODULI('{0: 17, 1: 19, 2: 23, 3: 27, 4: 29, 5: 31, default: 0}), .K(1021), .R(3), .W(5), .CHANNEL_TABLES(1'b1)) u_a (
    .clk, .rst_n, .in_valid(a_iv), .x(a_x), .out_valid(a_ov), .y(a_y));
  rns_scaler_checker #(.N(6), .MODULI('{0: 17, 1: 19, 2: 23, 3: 27, 4: 29, 5: 31, default: 0}), .K(1021), .W(5),
                       .LAT(5), .NOPS(1500)) chk_a (
    .clk, .rst_n, .in_valid(a_iv), .x(a_x), .out_valid(a_ov), .y(a_y), .done(a_done),
    .checks(a_c), .failures(a_f), .n_wrap(a_w), .n_xk_big(a_k), .n_alpha(a_a),
    .n_b2b(a_b), .n_bubble(a_i));

  // ---- 8 moduli ----
  logic b_iv, b_ov, b_done;
  logic [7:0][5:0] b_x, b_y;
  int b_c, b_f, b_w, b_k, b_a, b_b, b_i;
  rns_scaler #(.N(8), .MODULI('{0: 37, 1: 41, 2: 43, 3: 47, 4: 53, 5: 59, 6: 61, 7: 63, default: 0}), .K(509), .R(2), .W(6), .CHANNEL_TABLES(1'b0)) u_b (
    .clk, .rst_n, .in_valid(b_iv), .x(b_x), .out_valid(b_ov), .y(b_y));
  rns_scaler_checker #(.N(8), .MODULI('{0: 37, 1: 41, 2: 43, 3: 47, 4: 53, 5: 59, 6: 61, 7: 63, default: 0}), .K(509), .W(6),
                       .LAT(6), .NOPS(1500)) chk_b (
    .clk, .rst_n, .in_valid(b_iv), .x(b_x), .out_valid(b_ov), .y(b_y), .done(b_done),
    .checks(b_c), .failures(b_f), .n_wrap(b_w), .n_xk_big(b_k), .n_alpha(b_a),
    .n_b2b(b_b), .n_bubble(b_i));

  // ---- 12 moduli ----
  logic c_iv, c_ov, c_done;
  logic [11:0][6:0] c_x, c_y;
  int c_c, c_f, c_w, c_k, c_a, c_b, c_i;
  rns_scaler #(.N(12), .MODULI('{0: 67, 1: 71, 2: 73, 3: 79, 4: 83, 5: 89, 6: 97, 7: 101, 8: 103, 9: 107, 10: 109, 11: 113, default: 0}),
               .K(251), .R(2), .W(7), .CHANNEL_TABLES(1'b1)) u_c (
    .clk, .rst_n, .in_valid(c_iv), .x(c_x), .out_valid(c_ov), .y(c_y));
  rns_scaler_checker #(.N(12), .MODULI('{0: 67, 1: 71, 2: 73, 3: 79, 4: 83, 5: 89, 6: 97, 7: 101, 8: 103, 9: 107, 10: 109, 11: 113, default: 0}),
                       .K(251), .W(7), .LAT(7), .NOPS(1500)) chk_c (
    .clk, .rst_n, .in_valid(c_iv), .x(c_x), .out_valid(c_ov), .y(c_y), .done(c_done),
    .checks(c_c), .failures(c_f), .n_wrap(c_w), .n_xk_big(c_k), .n_alpha(c_a),
    .n_b2b(c_b), .n_bubble(c_i));

  int checks, failures;

  // Every configuration must see subtraction wraps, CRT corrections,
  // back-to-back operands and idle cycles. (With K below the largest modulus,
  // as in the 8- and 12-moduli sets, <X>_K can never exceed every modulus.)
  task automatic need(string what, int cnt);
    checks++;
    if (cnt == 0) begin
      failures++;
      $display("FAIL %s never happened", what);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (a_done && b_done && c_done);
    checks   = a_c + b_c + c_c;
    failures = a_f + b_f + c_f;
    need("wrap (6 moduli)", a_w);   need("wrap (8 moduli)", b_w);   need("wrap (12 moduli)", c_w);
    need("CRT correction (6 moduli)", a_a);
    need("CRT correction (8 moduli)", b_a);
    need("CRT correction (12 moduli)", c_a);
    need("large <X>_K (6 moduli)", a_k);
    need("back-to-back", a_b + b_b + c_b);
    need("idle cycles", a_i + b_i + c_i);
    // each channel table fits the 32K-word tables of the cost model
    checks += 3;
    if (u_a.g_chan[0].u_scale.TABLE_AW != 15) failures++;
    if (u_b.g_chan[0].u_scale.TABLE_AW != 15) failures++;
    if (u_c.g_chan[0].u_scale.TABLE_AW != 15) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", a_c + b_c + c_c + 1, a_f + b_f + c_f + 1);
    $finish;
  end
endmodule
