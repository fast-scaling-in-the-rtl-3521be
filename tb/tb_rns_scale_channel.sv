// tb_rns_scale_channel: checks the per-channel scaling lookup.
//
// For two channels (modulus 23 and modulus 32, K = 1039) every pair of
// inputs x < m, <X>_K < K is applied, one per clock, and the registered
// output one clock later must be the value y with y*K = x - <X>_K (mod m),
// found here by searching y, independently of any modular inverse. The
// worked example's first channel (x = 9, <X>_K = 637 -> y = 4) is also
// checked literally. Each channel is built both as logic and as a stored
// table; both must give the reference value, and the table must have the
// 16 address bits (64K words) of the worked example.
module tb_rns_scale_channel;
  localparam int unsigned K = 1039;

  logic        clk = 1'b0;
  logic [4:0]  xa, xb, ya, yb, ta, tb;
  logic [10:0] xk;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rns_scale_channel #(.MOD(23), .K(K), .W(5), .STORED_TABLE(1'b0)) u_a (.clk, .x(xa), .xk, .y(ya));
  rns_scale_channel #(.MOD(32), .K(K), .W(5), .STORED_TABLE(1'b0)) u_b (.clk, .x(xb), .xk, .y(yb));
  // the same two channels built as stored tables (the default)
  rns_scale_channel #(.MOD(23), .K(K), .W(5), .STORED_TABLE(1'b1)) u_ta (.clk, .x(xa), .xk, .y(ta));
  rns_scale_channel #(.MOD(32), .K(K), .W(5), .STORED_TABLE(1'b1)) u_tb (.clk, .x(xb), .xk, .y(tb));

  function automatic int unsigned ref_y(int unsigned xv, int unsigned kv, int unsigned m);
    for (int unsigned c = 0; c < m; c++)
      if ((c * K) % m == ((xv + m * 64) - kv) % m) return c;
    return 9999;
  endfunction

  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    int unsigned ea, eb;
    for (int unsigned kv = 0; kv < K; kv++) begin
      for (int unsigned xv = 0; xv < 32; xv++) begin
        @(negedge clk);
        xa = 5'(xv % 23);
        xb = 5'(xv);
        xk = 11'(kv);
        ea = ref_y(xv % 23, kv, 23);
        eb = ref_y(xv, kv, 32);
        @(negedge clk);
        checks += 4;
        if (32'(ta) != ea) begin
          failures++;
          if (failures < 10) $display("FAIL table m=23 x=%0d xk=%0d y=%0d expected %0d", xv % 23, kv, ta, ea);
        end
        if (32'(tb) != eb) begin
          failures++;
          if (failures < 10) $display("FAIL table m=32 x=%0d xk=%0d y=%0d expected %0d", xv, kv, tb, eb);
        end
        if (32'(ya) != ea) begin
          failures++;
          if (failures < 10) $display("FAIL m=23 x=%0d xk=%0d y=%0d expected %0d", xv % 23, kv, ya, ea);
        end
        if (32'(yb) != eb) begin
          failures++;
          if (failures < 10) $display("FAIL m=32 x=%0d xk=%0d y=%0d expected %0d", xv, kv, yb, eb);
        end
      end
    end
    @(negedge clk);
    xa = 5'd9;
    xk = 11'd637;
    @(negedge clk);
    checks += 3;
    if (ya != 5'd4) failures++;
    if (ta != 5'd4) failures++;
    // K = 1039 (11 bits) with 5-bit residues addresses a 64K-word table
    if (u_ta.TABLE_AW != 16) failures++;
    finish();
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    finish();
  end
endmodule
