// delay_line: DEPTH-stage register delay for a bundle of WIDTH bits.
//
// Used for the delay compensation of the equaliser (aligning the input
// samples and reference symbols with the error they belong to) and for
// aligning frame flags with the data path. DEPTH = 0 is a wire. Registers
// reset to zero.
module delay_line #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned DEPTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_reg
    logic [WIDTH-1:0] r [DEPTH];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int unsigned i = 0; i < DEPTH; i++) r[i] <= '0;
      end else begin
        r[0] <= d;
        for (int unsigned i = 1; i < DEPTH; i++) r[i] <= r[i-1];
      end
    end
    assign q = r[DEPTH-1];
  end

endmodule
