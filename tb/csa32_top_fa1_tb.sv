// csa32_top_fa1_tb: end-to-end check of all four 32-bit adder variants, at the
// default sizes but with the design-1 (two half adder) full-adder cell (32
// bits, 4-bit select blocks, 8-bit pipeline segments, two parallel paths).
//
// One operand stream drives all variants. Operands change on the falling
// edge; en is low about a quarter of the cycles and operands are repeated
// about one time in eight, so the clock gates have both reasons to stop a
// clock. Reference models in the test predict each output:
//   reg      - two register stages, integer addition between them;
//   ccg/ecg  - the same with load enable en;
//   pipe     - the set taken PATHS*NS = 8 edges earlier, marked by pipe_valid.
// It also counts, and requires at least once: a gated-off clock for en low
// (common and enhanced gating), an enhanced-gating skip for unchanged
// operands, a result bank left unclocked, a select block taking its
// carry-in-1 sum and one taking its carry-in-0 sum, a carry passed between
// pipeline segments, results from both pipeline paths, and a carry out of 1.
module csa32_top_fa1_tb;
  localparam int LAT = 8;
  localparam int N   = 3000;

  logic        clk = 1'b0, rst_n = 1'b1, en = 1'b1, in_valid = 1'b0;
  logic [31:0] a = '0, b = '0;
  logic        cin = 1'b0;
  logic [31:0] reg_sum, ccg_sum, ecg_sum, pipe_sum;
  logic        reg_cout, ccg_cout, ecg_cout, pipe_cout, pipe_valid;

  int checks = 0, failures = 0, edge_no = 0;
  int n_ccg_off = 0, n_ecg_off_en = 0, n_ecg_off_same = 0, n_ecg_out_off = 0;
  int n_sel1 = 0, n_sel0 = 0, n_seg_carry = 0, n_path0 = 0, n_path1 = 0, n_cout = 0;

  // Reference state.
  logic [31:0] r_a = '0, r_b = '0, g_a = '0, g_b = '0;
  logic        r_c = 1'b0, g_c = 1'b0;
  logic [32:0] r_out = '0, g_out = '0;
  logic        exp_v [N+LAT+8];
  logic [32:0] exp_s [N+LAT+8];

  csa32_top #(.FA(csa_pkg::FA_HALF_ADDERS)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .in_valid(in_valid), .a(a), .b(b), .cin(cin),
    .reg_sum(reg_sum), .reg_cout(reg_cout), .ccg_sum(ccg_sum), .ccg_cout(ccg_cout),
    .ecg_sum(ecg_sum), .ecg_cout(ecg_cout),
    .pipe_valid(pipe_valid), .pipe_sum(pipe_sum), .pipe_cout(pipe_cout)
  );

  always #5 clk = ~clk;

  function automatic logic [32:0] add(input logic [31:0] x, input logic [31:0] y, input logic c);
    return {1'b0, x} + {1'b0, y} + 33'(c);
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      logic [32:0] s, carries;
      s       = add(a, b, cin);
      carries = {1'b0, a} ^ {1'b0, b} ^ s;
      for (int k = 4; k < 32; k += 4) begin
        if (carries[k]) n_sel1++;
        else            n_sel0++;
      end
      if (in_valid && (carries[8] || carries[16] || carries[24])) n_seg_carry++;
      if (s[32]) n_cout++;
      // Plain registered adder.
      r_out <= add(r_a, r_b, r_c);
      r_a   <= a;
      r_b   <= b;
      r_c   <= cin;
      // Gated adders (load enable en).
      g_out <= add(g_a, g_b, g_c);
      if (en) begin
        g_a <= a;
        g_b <= b;
        g_c <= cin;
      end
      // Pipeline.
      exp_v[edge_no] = in_valid;
      exp_s[edge_no] = s;
      edge_no++;
      // Clock gating activity, sampled just after the edge.
      #1;
      if (!dut.u_ccg.gclk_in) n_ccg_off++;
      if (!dut.u_ecg.u_in.gclk) begin
        if (!en) n_ecg_off_en++;
        else     n_ecg_off_same++;
      end
      if (!dut.u_ecg.u_out.gclk) n_ecg_out_off++;
    end
  end

  task automatic cmp(input string what, input logic [32:0] got, input logic [32:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at edge %0d: got %0b_%h expected %0b_%h", what, edge_no,
               got[32], got[31:0], exp[32], exp[31:0]);
    end
  endtask

  task automatic need(input string what, input int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL never happened: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (N + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned pick;
    foreach (exp_v[i]) exp_v[i] = 1'b0;
    #1 rst_n = 1'b0;   // a real falling edge for the asynchronous reset
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Example operands: 7FFFFFFF + 7FFFFFFF + 1 = FFFFFFFF, carry out 0.
    a = 32'h7FFF_FFFF; b = 32'h7FFF_FFFF; cin = 1'b1; in_valid = 1'b1; en = 1'b1;
    for (int i = 0; i < N + LAT + 2; i++) begin
      @(negedge clk);
      if (edge_no == 2) begin
        cmp("example reg", {reg_cout, reg_sum}, 33'h0_FFFF_FFFF);
        cmp("example ccg", {ccg_cout, ccg_sum}, 33'h0_FFFF_FFFF);
        cmp("example ecg", {ecg_cout, ecg_sum}, 33'h0_FFFF_FFFF);
      end
      cmp("reg", {reg_cout, reg_sum}, r_out);
      cmp("ccg", {ccg_cout, ccg_sum}, g_out);
      cmp("ecg", {ecg_cout, ecg_sum}, g_out);
      if (edge_no > LAT) begin
        int e;
        e = edge_no - 1 - LAT;
        checks++;
        if (pipe_valid !== exp_v[e]) begin
          failures++;
          $display("FAIL pipe_valid at edge %0d: %0b expected %0b", edge_no, pipe_valid, exp_v[e]);
        end else if (pipe_valid) begin
          cmp("pipe", {pipe_cout, pipe_sum}, exp_s[e]);
          if (e == 0) cmp("example pipe", {pipe_cout, pipe_sum}, 33'h0_FFFF_FFFF);
          if (dut.u_pipe.sel == 0) n_path0++;
          else                     n_path1++;
        end
      end
      if (i < N) begin
        pick = $urandom_range(0, 7);
        case (pick)
          0:       begin a = 32'hFFFF_FFFF; b = $urandom; end
          1:       begin a = $urandom; b = ~a; end
          2:       ;  // same operands again
          default: begin a = $urandom; b = $urandom; end
        endcase
        if (pick != 2) cin = 1'($urandom);
        en       = ($urandom_range(0, 3) != 0);
        in_valid = ($urandom_range(0, 7) != 0);
      end else begin
        in_valid = 1'b0;
      end
    end
    need("common gating: clock stopped", n_ccg_off);
    need("enhanced gating: clock stopped for en low", n_ecg_off_en);
    need("enhanced gating: clock stopped for unchanged operands", n_ecg_off_same);
    need("enhanced gating: result bank not clocked", n_ecg_out_off);
    need("select block took carry-in-1 sum", n_sel1);
    need("select block took carry-in-0 sum", n_sel0);
    need("carry passed between pipeline segments", n_seg_carry);
    need("result from pipeline path 0", n_path0);
    need("result from pipeline path 1", n_path1);
    need("carry out of 1", n_cout);
    $display("ccg_off=%0d ecg_off_en=%0d ecg_off_same=%0d ecg_out_off=%0d sel1=%0d sel0=%0d seg_carry=%0d path0=%0d path1=%0d cout=%0d",
             n_ccg_off, n_ecg_off_en, n_ecg_off_same, n_ecg_out_off, n_sel1, n_sel0,
             n_seg_carry, n_path0, n_path1, n_cout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
