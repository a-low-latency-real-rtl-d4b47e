// adder_tree: pipelined binary adder tree.
//
// Adds NUM signed inputs of width IN_W. The inputs are padded with zeros up
// to the next power of two and reduced pairwise, one register level per tree
// level, so the latency is exactly ceil(log2(NUM)) clock cycles (an N-input
// adder tree costs ceil(log2 N) cycles in the receiver's latency budget).
// The output is IN_W + ceil(log2(NUM)) bits wide, so it never overflows.
// A valid bit travels alongside the data. With NUM = 1 the tree is a wire.
// Registers are reset asynchronously (active-low rst_n).
module adder_tree #(
  parameter int unsigned NUM  = 4,
  parameter int unsigned IN_W = 16,
  localparam int unsigned LEV   = (NUM > 1) ? $clog2(NUM) : 0,
  localparam int unsigned OUT_W = IN_W + LEV
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data [NUM],
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_sum
);

  localparam int unsigned NP = 1 << LEV;

  // level 0: inputs widened and zero padded to a power of two
  logic signed [OUT_W-1:0] lvl0 [NP];
  always_comb begin
    for (int unsigned i = 0; i < NP; i++)
      lvl0[i] = (i < NUM) ? OUT_W'(in_data[i]) : '0;
  end

  for (genvar l = 1; l <= LEV; l++) begin : g_lvl
    localparam int unsigned CNT = NP >> l;
    logic signed [OUT_W-1:0] s [CNT];
    logic                    v;
    logic signed [OUT_W-1:0] a [2*CNT];
    logic                    av;
    if (l == 1) begin : g_src0
      assign a  = lvl0;
      assign av = in_valid;
    end else begin : g_srcn
      assign a  = g_lvl[l-1].s;
      assign av = g_lvl[l-1].v;
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v <= 1'b0;
        for (int unsigned i = 0; i < CNT; i++) s[i] <= '0;
      end else begin
        v <= av;
        for (int unsigned i = 0; i < CNT; i++) s[i] <= a[2*i] + a[2*i+1];
      end
    end
  end

  if (LEV == 0) begin : g_wire
    assign out_sum   = lvl0[0];
    assign out_valid = in_valid;
  end else begin : g_out
    assign out_sum   = g_lvl[LEV].s[0];
    assign out_valid = g_lvl[LEV].v;
  end

endmodule
