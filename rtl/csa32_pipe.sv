// csa32_pipe: 32-bit adder with parallelism and pipelining.
//
// The 32-bit addition is cut into NS = W/SEG segments of SEG bits, each added
// by its own SEG-bit carry select adder (csa) in its own pipeline stage. The
// carry of a segment is registered and passed on to the next segment one
// stage later, and the operand bits of the upper segments are carried along
// (skewed) in the pipeline registers, so each segment meets its carry in the
// right cycle. A pipeline has NS+1 register stages: the operand registers and
// one after each segment adder.
//
// PATHS copies of this pipeline work side by side. A phase counter deals the
// incoming operand sets out in turn: path p loads, and advances, only on the
// clock edges where phase == p, so each path runs at 1/PATHS of the clock
// rate (a clock enable on the single clock stands in for the divided clock of
// each path). An output multiplexer that switches at the full rate shows, in
// each cycle, the path that was advanced at the last edge.
//
// Interface and timing: an operand set (a, b, cin, in_valid) is taken at
// every rising edge. Its result appears on sum/cout with out_valid high for
// exactly one cycle, PATHS*NS cycles after the edge that took it (8 cycles at
// the defaults: 5 edges of its own path's half-rate clock). Throughput is one
// addition per clock.
//
// The segment width of 8, the two parallel paths and the half-rate paths
// follow the parallel-pipelined adder this models; feeding cin (rather than 0)
// into the lowest segment, the in_valid/out_valid flags, the use of
// edge-triggered registers for the pipeline stages and the asynchronous
// active-low reset are this design's choices.
module csa32_pipe #(
  parameter int                  W     = 32,
  parameter int                  SEG   = 8,
  parameter int                  BW    = 4,
  parameter int                  PATHS = 2,
  parameter csa_pkg::fa_design_e FA    = csa_pkg::FA_MINORITY
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic         out_valid,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int NS = W / SEG;
  localparam int PW = (PATHS > 1) ? $clog2(PATHS) : 1;

  if (W % SEG != 0) begin : g_bad_width
    $error("csa32_pipe: W (%0d) must be a multiple of SEG (%0d)", W, SEG);
  end

  // One pipeline register: operands still to be added, sum bits already
  // formed, the carry into the next segment and a valid flag.
  typedef struct packed {
    logic         v;
    logic         c;
    logic [W-1:0] a;
    logic [W-1:0] b;
    logic [W-1:0] s;
  } stage_t;

  logic [PW-1:0] phase, sel;
  stage_t        path_out [PATHS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   phase <= '0;
    else if (phase == PW'(PATHS - 1)) phase <= '0;
    else                          phase <= phase + 1'b1;
  end

  for (genvar p = 0; p < PATHS; p++) begin : g_path
    logic   load;
    stage_t st [NS+1];

    assign load = (phase == PW'(p));

    // Operand registers.
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        st[0] <= '0;
      end else if (load) begin
        st[0].v <= in_valid;
        st[0].c <= cin;
        st[0].a <= a;
        st[0].b <= b;
        st[0].s <= '0;
      end
    end

    for (genvar k = 0; k < NS; k++) begin : g_seg
      logic [SEG-1:0] s_seg;
      logic           c_seg;

      csa #(.W(SEG), .BW(BW), .FA(FA)) u_add (
        .a(st[k].a[k*SEG +: SEG]), .b(st[k].b[k*SEG +: SEG]), .cin(st[k].c),
        .s(s_seg), .cout(c_seg)
      );

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          st[k+1] <= '0;
        end else if (load) begin
          st[k+1]                <= st[k];
          st[k+1].s[k*SEG +: SEG] <= s_seg;
          st[k+1].c              <= c_seg;
        end
      end
    end

    assign path_out[p] = st[NS];
  end

  // The path advanced at the last edge is the one before the current phase.
  assign sel = (phase == '0) ? PW'(PATHS - 1) : phase - 1'b1;

  assign out_valid = path_out[sel].v;
  assign sum       = path_out[sel].s;
  assign cout      = path_out[sel].c;
endmodule
