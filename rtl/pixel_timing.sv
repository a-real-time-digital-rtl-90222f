// Pixel and line phase of the incoming CCD samples.
//
// Tells the colour path which of the four added colour signals a sample
// is. Within a line, even columns carry C1 or C3 and odd columns C2 or C4,
// so col_odd is reset at each line start (hd) and toggles every pixel.
// Lines alternate between C1/C2 and C3/C4 (line_c34). Following the colour
// filter layout, the first line of the odd field (field = 0) is a C1/C2
// line and the first line of the even field (field = 1) a C3/C4 line; vd
// marks the first line of a field and must coincide with its hd.
//
// Timing: the flags belong to the sample present on the same cycle.
module pixel_timing (
  input  logic clk,
  input  logic rst_n,
  input  logic hd,        // first pixel of a line
  input  logic vd,        // first line of a field
  input  logic field,     // 0 = odd field, 1 = even field
  output logic col_odd,
  output logic line_c34
);

  logic col_odd_r, line_c34_r;

  always_comb begin
    col_odd  = hd ? 1'b0 : col_odd_r;
    if (hd && vd)  line_c34 = field;
    else if (hd)   line_c34 = !line_c34_r;
    else           line_c34 = line_c34_r;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_odd_r  <= 1'b0;
      line_c34_r <= 1'b0;
    end else begin
      col_odd_r  <= !col_odd;
      line_c34_r <= line_c34;
    end
  end

endmodule
