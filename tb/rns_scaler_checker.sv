// rns_scaler_checker: stimulus generator and scoreboard for rns_scaler.
//
// Drives a stream of operands into a scaler (on falling clock edges) and
// checks every result against a reference computed here with plain binary
// arithmetic: X is drawn at random below M, its residues are X mod m_i, and
// the expected result is (X / K) mod m_i. Operands are issued back to back
// with random idle cycles in between; every result must appear exactly LAT
// cycles after its operand. A few directed operands come first: the worked
// example X = 578321, 0, 1, K-1, K, K+1 and M-1.
//
// It also counts how often the situations that exercise the scheme occur:
//   n_wrap   : x_i < <<X>_K>_{m_i}, so the channel subtraction wraps
//   n_xk_big : <X>_K larger than the largest modulus
//   n_alpha  : the CRT sum exceeds M, so the base extension must correct it
//   n_b2b    : operands on consecutive cycles
//   n_bubble : idle cycles between operands
// When WORKED_EXAMPLE is set, the worked example's printed residues
// {9,21,8,3,16} and result {4,6,16,5,29} (moduli 23..31, K = 1039) are
// checked literally as well.
module rns_scaler_checker #(
  parameter int unsigned N          = 5,
  parameter rns_pkg::moduli_t MODULI = '{0: 23, 1: 25, 2: 27, 3: 29, 4: 31, default: 0},
  parameter int unsigned K          = 1039,
  parameter int unsigned W          = 5,
  parameter int unsigned LAT        = 5,
  parameter int unsigned NOPS       = 2000,
  parameter int unsigned IDLE_PCT   = 25,
  parameter bit          WORKED_EXAMPLE = 1'b0
) (
  input  logic                clk,
  input  logic                rst_n,
  output logic                in_valid,
  output logic [N-1:0][W-1:0] x,
  input  logic                out_valid,
  input  logic [N-1:0][W-1:0] y,
  output logic                done,
  output int                  checks,
  output int                  failures,
  output int                  n_wrap,
  output int                  n_xk_big,
  output int                  n_alpha,
  output int                  n_b2b,
  output int                  n_bubble
);
  typedef logic [127:0] wide_t;

  typedef struct {
    logic [N-1:0][W-1:0] y;
    wide_t               x;
    int unsigned         cyc;
  } exp_t;

  exp_t        q [$];
  int unsigned cyc;
  int unsigned issued;
  int unsigned received;
  int unsigned drain;
  bit          prev_valid;
  wide_t       m_full;
  int unsigned m_max;

  function automatic wide_t rand_below(wide_t lim);
    wide_t r;
    r = {$urandom, $urandom, $urandom, $urandom};
    return r % lim;
  endfunction

  function automatic int unsigned inv_mod(int unsigned a, int unsigned m);
    for (int unsigned v = 1; v < m; v++)
      if (((a % m) * v) % m == 1) return v;
    return 0;
  endfunction

  // Residues of X, and bookkeeping of the counted situations.
  function automatic logic [N-1:0][W-1:0] to_rns(wide_t v);
    logic [N-1:0][W-1:0] r;
    for (int unsigned i = 0; i < N; i++) r[i] = W'(v % wide_t'(MODULI[i]));
    return r;
  endfunction

  task automatic account(wide_t xv);
    wide_t       xk;
    wide_t       crt;
    wide_t       mi;
    int unsigned t;
    xk  = xv % wide_t'(K);
    crt = 0;
    for (int unsigned i = 0; i < N; i++) begin
      if ((xv % wide_t'(MODULI[i])) < (xk % wide_t'(MODULI[i]))) n_wrap++;
      mi  = m_full / wide_t'(MODULI[i]);
      t   = int'(((xv % wide_t'(MODULI[i])) * wide_t'(inv_mod(int'(mi % wide_t'(MODULI[i])), MODULI[i])))
                 % wide_t'(MODULI[i]));
      crt = crt + wide_t'(t) * mi;
    end
    if (xk >= wide_t'(m_max)) n_xk_big++;
    if (crt >= m_full) n_alpha++;
  endtask

  task automatic issue(wide_t xv);
    exp_t e;
    in_valid = 1'b1;
    x        = to_rns(xv);
    e.x      = xv;
    e.y      = to_rns(xv / wide_t'(K));
    e.cyc    = cyc;
    q.push_back(e);
    account(xv);
    if (prev_valid) n_b2b++;
    prev_valid = 1'b1;
    issued++;
    if (WORKED_EXAMPLE && xv == 578321) begin
      checks++;
      if (x != {W'(16), W'(3), W'(8), W'(21), W'(9)}) begin
        failures++;
        $display("FAIL example residues %p", x);
      end
    end
  endtask

  initial begin
    m_full = 1;
    m_max  = 0;
    for (int unsigned i = 0; i < N; i++) begin
      m_full = m_full * wide_t'(MODULI[i]);
      if (MODULI[i] > m_max) m_max = MODULI[i];
    end
    in_valid = 1'b0;
    x        = '0;
    done     = 1'b0;
    checks   = 0;
    failures = 0;
    n_wrap   = 0;
    n_xk_big = 0;
    n_alpha  = 0;
    n_b2b    = 0;
    n_bubble = 0;
    cyc      = 0;
    issued   = 0;
    received = 0;
    drain    = 0;
    prev_valid = 1'b0;
  end

  wide_t directed [7];
  assign directed = '{wide_t'(578321), wide_t'(0), wide_t'(1), wide_t'(K - 1),
                      wide_t'(K), wide_t'(K + 1), m_full - 1};

  always @(negedge clk) begin
    if (!rst_n) begin
      in_valid = 1'b0;
    end else if (!done) begin
      cyc++;
      // ---- check what the scaler presents now ----
      if (out_valid) begin
        checks++;
        if (q.size() == 0) begin
          failures++;
          $display("FAIL unexpected result at cycle %0d", cyc);
        end else begin
          exp_t e;
          e = q.pop_front();
          received++;
          if (y != e.y) begin
            failures++;
            $display("FAIL X=%0d: y=%p expected %p", e.x, y, e.y);
          end
          checks++;
          if (cyc - e.cyc != LAT) begin
            failures++;
            $display("FAIL X=%0d: latency %0d expected %0d", e.x, cyc - e.cyc, LAT);
          end
          if (WORKED_EXAMPLE && e.x == 578321) begin
            checks++;
            if (y != {W'(29), W'(5), W'(16), W'(6), W'(4)}) begin
              failures++;
              $display("FAIL example result %p", y);
            end
          end
        end
      end
      // ---- drive the next operand or an idle cycle ----
      if (issued < NOPS) begin
        if (issued >= 7 && ($urandom % 100) < IDLE_PCT) begin
          in_valid   = 1'b0;
          x          = to_rns(rand_below(m_full));   // ignored by the scaler
          prev_valid = 1'b0;
          n_bubble++;
        end else if (issued < 7) begin
          issue(directed[issued]);
        end else begin
          issue(rand_below(m_full));
        end
      end else begin
        in_valid = 1'b0;
        drain++;
        if (drain > LAT + 2) begin
          checks++;
          if (received != NOPS || q.size() != 0) begin
            failures++;
            $display("FAIL %0d results for %0d operands", received, NOPS);
          end
          done = 1'b1;
        end
      end
    end
  end

endmodule
