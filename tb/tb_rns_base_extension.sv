// tb_rns_base_extension: checks the base extension unit in the default
// configuration (moduli {23,25,27,29,31}, K = 1039, R = 3).
//
// Random operands X < M, plus 0, M-1 and the worked example X = 578321
// (whose <X>_K is 637), are applied one per clock with random idle cycles.
// Every output is compared with X mod K computed in binary, and must arrive
// exactly ceil(log_3 5) + 2 = 4 cycles after its operand.
module tb_rns_base_extension;
  localparam int unsigned N   = 5;
  localparam int unsigned W   = 5;
  localparam int unsigned K   = 1039;
  localparam int unsigned LAT = 4;
  localparam int unsigned MODS [N] = '{23, 25, 27, 29, 31};
  localparam int unsigned NOPS = 2000;

  typedef logic [63:0] v_t;
  typedef struct { v_t x; int unsigned cyc; } exp_t;

  logic                clk = 1'b0;
  logic                rst_n;
  logic                in_valid;
  logic [N-1:0][W-1:0] x;
  logic                out_valid;
  logic [10:0]         xk;

  int checks = 0, failures = 0;
  int unsigned cyc = 0, issued = 0, received = 0;
  exp_t q [$];
  v_t   m_full;

  always #5 clk = ~clk;

  rns_base_extension dut (.clk, .rst_n, .in_valid, .x, .out_valid, .xk);

  function automatic logic [N-1:0][W-1:0] to_rns(v_t v);
    logic [N-1:0][W-1:0] r;
    for (int unsigned i = 0; i < N; i++) r[i] = W'(v % v_t'(MODS[i]));
    return r;
  endfunction

  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    m_full = 1;
    for (int unsigned i = 0; i < N; i++) m_full = m_full * v_t'(MODS[i]);
    rst_n    = 1'b0;
    in_valid = 1'b0;
    x        = '0;
    repeat (3) @(posedge clk);
    checks++;
    if (out_valid) failures++;
    rst_n = 1'b1;
    while (received < NOPS) begin
      @(negedge clk);
      cyc++;
      if (out_valid) begin
        exp_t e;
        checks++;
        if (q.size() == 0) begin
          failures++;
          $display("FAIL unexpected output");
        end else begin
          e = q.pop_front();
          received++;
          if (v_t'(xk) != e.x % v_t'(K)) begin
            failures++;
            $display("FAIL X=%0d xk=%0d expected %0d", e.x, xk, e.x % v_t'(K));
          end
          checks++;
          if (cyc - e.cyc != LAT) begin
            failures++;
            $display("FAIL latency %0d", cyc - e.cyc);
          end
          if (e.x == 578321) begin
            checks++;
            if (xk != 11'd637) failures++;
          end
        end
      end
      if (issued < NOPS && (issued < 3 || ($urandom % 4) != 0)) begin
        v_t xv;
        case (issued)
          0:       xv = 578321;
          1:       xv = 0;
          2:       xv = m_full - 1;
          default: xv = {$urandom, $urandom} % m_full;
        endcase
        in_valid = 1'b1;
        x        = to_rns(xv);
        q.push_back('{xv, cyc});
        issued++;
      end else begin
        in_valid = 1'b0;
      end
    end
    finish();
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    finish();
  end
endmodule
