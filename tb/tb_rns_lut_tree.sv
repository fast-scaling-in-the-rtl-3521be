// tb_rns_lut_tree: checks the r-ary reduction tree in three shapes.
//
// Each instance adds N operands modulo MOD; the result must equal the sum
// modulo MOD computed in the testbench and appear exactly ceil(log_R N)
// cycles after the operands:
//   N = 5,  R = 3 : 2 levels, the second level has a short group
//   N = 12, R = 2 : 4 levels
//   N = 9,  R = 3 : 2 full levels
//   N = 8,  R = 3 : 2 levels, a short group and no pass-through in level 1
// The number of tables each instance builds must be ceil((N-1)/(R-1)).
// Operands are random below MOD, with a share of all-maximum operands so that
// every node has to fold its sum back below MOD more than once.
module tb_rns_lut_tree;
  localparam int unsigned DW = 24;
  localparam logic [DW-1:0] MOD = DW'(13956975);

  logic clk = 1'b0;
  logic rst_n;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [11:0][DW-1:0] din;
  logic                vin;
  logic [3:0]          vout;
  logic [DW-1:0]       dout [4];

  rns_lut_tree #(.N(5),  .R(3), .DW(DW), .MOD(MOD)) u_a (
    .clk, .rst_n, .in_valid(vin), .in_data(din[4:0]), .out_valid(vout[0]), .out_data(dout[0]));
  rns_lut_tree #(.N(12), .R(2), .DW(DW), .MOD(MOD)) u_b (
    .clk, .rst_n, .in_valid(vin), .in_data(din[11:0]), .out_valid(vout[1]), .out_data(dout[1]));
  rns_lut_tree #(.N(9),  .R(3), .DW(DW), .MOD(MOD)) u_c (
    .clk, .rst_n, .in_valid(vin), .in_data(din[8:0]), .out_valid(vout[2]), .out_data(dout[2]));
  rns_lut_tree #(.N(8),  .R(3), .DW(DW), .MOD(MOD)) u_d (
    .clk, .rst_n, .in_valid(vin), .in_data(din[7:0]), .out_valid(vout[3]), .out_data(dout[3]));

  localparam int unsigned NS  [4] = '{5, 12, 9, 8};
  localparam int unsigned LAT [4] = '{2, 4, 2, 2};

  typedef struct { logic [DW-1:0] s [4]; int unsigned cyc; } exp_t;
  exp_t q [4][$];
  int unsigned cyc = 0;

  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    rst_n = 1'b0;
    vin   = 1'b0;
    din   = '0;
    repeat (3) @(posedge clk);
    checks++;
    if (vout != 4'b0000) failures++;
    checks += 4;
    if (u_a.NUM_TABLES != 2)  failures++;
    if (u_b.NUM_TABLES != 11) failures++;
    if (u_c.NUM_TABLES != 4)  failures++;
    if (u_d.NUM_TABLES != 4)  failures++;
    rst_n = 1'b1;
    for (int unsigned n = 0; n < 1010; n++) begin
      @(negedge clk);
      cyc++;
      for (int t = 0; t < 4; t++) begin
        if (vout[t]) begin
          exp_t e;
          checks++;
          if (q[t].size() == 0) begin
            failures++;
          end else begin
            e = q[t].pop_front();
            if (dout[t] != e.s[t]) begin
              failures++;
              $display("FAIL tree %0d: %0d expected %0d", t, dout[t], e.s[t]);
            end
            checks++;
            if (cyc - e.cyc != LAT[t]) begin
              failures++;
              $display("FAIL tree %0d latency %0d", t, cyc - e.cyc);
            end
          end
        end
      end
      if (n < 1000 && ($urandom % 5) != 0) begin
        exp_t e;
        logic [63:0] acc;
        for (int unsigned k = 0; k < 12; k++)
          din[k] = (n % 7 == 0) ? MOD - 1 : DW'({$urandom} % 32'(MOD));
        for (int t = 0; t < 4; t++) begin
          acc = 0;
          for (int unsigned k = 0; k < NS[t]; k++) acc = acc + 64'(din[k]);
          e.s[t] = DW'(acc % 64'(MOD));
        end
        e.cyc = cyc;
        for (int t = 0; t < 4; t++) q[t].push_back(e);
        vin = 1'b1;
      end else begin
        vin = 1'b0;
      end
    end
    for (int t = 0; t < 4; t++) begin
      checks++;
      if (q[t].size() != 0) begin
        failures++;
        $display("FAIL tree %0d: %0d results missing", t, q[t].size());
      end
    end
    finish();
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    finish();
  end
endmodule
