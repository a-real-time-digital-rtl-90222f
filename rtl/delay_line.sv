// Fixed delay of N clock cycles for a W-bit signal (N = 0 passes it
// straight through). Used to line up signals that travel along pipelines
// of different depth. Registers reset to zero.
module delay_line #(
  parameter int W = 1,
  parameter int N = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  if (N == 0) begin : g_wire
    assign dout = din;
  end else begin : g_regs
    logic [W-1:0] sr [N];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < N; i++) sr[i] <= '0;
      end else begin
        sr[0] <= din;
        for (int i = 1; i < N; i++) sr[i] <= sr[i-1];
      end
    end
    assign dout = sr[N-1];
  end

endmodule
