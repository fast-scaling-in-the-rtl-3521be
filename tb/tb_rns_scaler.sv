// tb_rns_scaler: end-to-end test of the RNS scaler in its default
// configuration (moduli {23,25,27,29,31}, K = 1039, R = 3).
//
// rns_scaler_checker streams 3000 operands through the scaler with random
// idle cycles, checks every result against floor(X/K) computed in binary,
// checks the latency of ceil(log_3 5) + 3 = 5 cycles for every operand, and
// checks the worked example X = 578321 -> Y = {4,6,16,5,29} literally, as
// well as its printed inverses <K^-1>_{m_i} = {6,9,25,23,2}. Each
// situation the scheme must handle (channel subtraction wrap, <X>_K above
// every modulus, CRT sum above M, back-to-back operands, idle cycles) must
// occur at least once.
module tb_rns_scaler;
  localparam int unsigned N = 5;
  localparam int unsigned W = 5;

  logic                clk = 1'b0;
  logic                rst_n;
  logic                in_valid;
  logic [N-1:0][W-1:0] x;
  logic                out_valid;
  logic [N-1:0][W-1:0] y;
  logic                done;
  int checks, failures, n_wrap, n_xk_big, n_alpha, n_b2b, n_bubble;
  int extra_fail = 0;

  always #5 clk = ~clk;

  rns_scaler dut (
    .clk, .rst_n, .in_valid, .x, .out_valid, .y
  );

  rns_scaler_checker #(
    .N(5), .MODULI('{0: 23, 1: 25, 2: 27, 3: 29, 4: 31, default: 0}), .K(1039), .W(5),
    .LAT(5), .NOPS(3000), .WORKED_EXAMPLE(1'b1)
  ) u_chk (
    .clk, .rst_n, .in_valid, .x, .out_valid, .y, .done,
    .checks, .failures, .n_wrap, .n_xk_big, .n_alpha, .n_b2b, .n_bubble
  );

  task automatic finish(int add_checks);
    int c, f;
    c = checks + add_checks;
    f = failures + extra_fail;
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  endtask

  initial begin
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    // out_valid must be low throughout reset
    if (out_valid) extra_fail++;
    // <K^-1>_{m_i} printed for the worked example: {6, 9, 25, 23, 2}
    if (dut.g_chan[0].u_scale.KINV != 6)  extra_fail++;
    if (dut.g_chan[1].u_scale.KINV != 9)  extra_fail++;
    if (dut.g_chan[2].u_scale.KINV != 25) extra_fail++;
    if (dut.g_chan[3].u_scale.KINV != 23) extra_fail++;
    if (dut.g_chan[4].u_scale.KINV != 2)  extra_fail++;
    rst_n = 1'b1;
    wait (done);
    $display("counts: wrap=%0d xk_big=%0d alpha=%0d back_to_back=%0d idle=%0d",
             n_wrap, n_xk_big, n_alpha, n_b2b, n_bubble);
    if (n_wrap   == 0) begin extra_fail++; $display("FAIL no subtraction wrap seen"); end
    if (n_xk_big == 0) begin extra_fail++; $display("FAIL no large <X>_K seen"); end
    if (n_alpha  == 0) begin extra_fail++; $display("FAIL no CRT correction seen"); end
    if (n_b2b    == 0) begin extra_fail++; $display("FAIL no back-to-back operands"); end
    if (n_bubble == 0) begin extra_fail++; $display("FAIL no idle cycles"); end
    finish(11);
  end

  initial begin
    repeat (20000) @(posedge clk);
    extra_fail++;
    $display("FAIL watchdog expired");
    finish(1);
  end
endmodule
