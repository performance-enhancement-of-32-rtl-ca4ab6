// csa32_pipe_tb: self-check of the parallel-pipelined 32-bit adder at its
// default size (8-bit segments, two half-rate paths).
//
// A new operand set, valid about 7 times in 8, is offered at every clock
// edge, so both paths are kept busy. The test records what was offered at
// each edge and, at every later cycle, expects out_valid and the integer sum
// of the set taken exactly PATHS*NS = 8 edges earlier, and nothing else. It
// counts results from each path and carries passed between segments.
module csa32_pipe_tb;
  localparam int LAT = 8;
  localparam int N   = 4000;

  logic        clk = 1'b0, rst_n = 1'b1, in_valid = 1'b0, out_valid;
  logic [31:0] a = '0, b = '0, sum;
  logic        cin = 1'b0, cout;
  int          checks = 0, failures = 0, edge_no = 0;
  int          results = 0, path_even = 0, path_odd = 0, seg_carries = 0;

  logic        exp_v [N+LAT+8];
  logic [32:0] exp_s [N+LAT+8];

  csa32_pipe dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b), .cin(cin),
    .out_valid(out_valid), .sum(sum), .cout(cout)
  );

  always #5 clk = ~clk;

  // Record the operand set taken at each edge after reset.
  always @(posedge clk) begin
    if (rst_n) begin
      logic [32:0] s, carries;
      s       = {1'b0, a} + {1'b0, b} + 33'(cin);
      carries = {1'b0, a} ^ {1'b0, b} ^ s;
      exp_v[edge_no] = in_valid;
      exp_s[edge_no] = s;
      if (in_valid && (carries[8] || carries[16] || carries[24])) seg_carries++;
      edge_no++;
    end
  end

  initial begin : watchdog
    repeat (N + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (exp_v[i]) exp_v[i] = 1'b0;
    #1 rst_n = 1'b0;   // a real falling edge for the asynchronous reset
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    a = 32'h7FFF_FFFF; b = 32'h7FFF_FFFF; cin = 1'b1; in_valid = 1'b1;
    for (int i = 0; i < N + LAT + 2; i++) begin
      @(negedge clk);
      // Edges 0 .. edge_no-1 have passed; the result now shown belongs to
      // the set taken at edge edge_no-1-LAT.
      if (edge_no > LAT) begin
        int e;
        e = edge_no - 1 - LAT;
        checks++;
        if (out_valid !== exp_v[e]) begin
          failures++;
          $display("FAIL edge %0d: out_valid=%0b expected %0b", edge_no, out_valid, exp_v[e]);
        end else if (out_valid) begin
          results++;
          if (e % 2 == 0) path_even++;
          else            path_odd++;
          checks++;
          if ({cout, sum} !== exp_s[e]) begin
            failures++;
            $display("FAIL set %0d: got %0b_%h expected %0b_%h", e, cout, sum, exp_s[e][32], exp_s[e][31:0]);
          end
          if (e == 0) begin
            checks++;
            if ({cout, sum} !== 33'h0_FFFF_FFFF) begin
              failures++;
              $display("FAIL example 7FFFFFFF+7FFFFFFF+1 gave %0b_%h", cout, sum);
            end
          end
        end
      end else begin
        checks++;
        if (out_valid !== 1'b0) begin
          failures++;
          $display("FAIL out_valid before the pipeline filled (edge %0d)", edge_no);
        end
      end
      if (i < N) begin
        in_valid = ($urandom_range(0, 7) != 0);
        a        = $urandom;
        b        = ($urandom_range(0, 3) == 0) ? ~a : $urandom;
        cin      = 1'($urandom);
      end else begin
        in_valid = 1'b0;
      end
    end
    checks++;
    if (path_even == 0 || path_odd == 0 || seg_carries == 0) begin
      failures++;
      $display("FAIL coverage: path_even=%0d path_odd=%0d seg_carries=%0d", path_even, path_odd, seg_carries);
    end
    $display("results=%0d path_even=%0d path_odd=%0d seg_carries=%0d", results, path_even, path_odd, seg_carries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
