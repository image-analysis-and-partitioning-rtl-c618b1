// segment_walker: position of the current segment on the image.
//
// The image is cut into cores of CORE_W x CORE_H pixels (m x n) that tile it without gaps,
// row of segments after row of segments, left to right. The processor array holds a
// core plus its overlap border; that border is added by the segment controller. init
// places the first core at (-off_x, -off_y), so that the partitioning grid can be
// displaced by a few pixels (0 for the plain grid); next moves to the following core.
// Cores may stick out of the image on the right and bottom (and on the top and left when
// displaced); the controller skips the pixels that fall outside. last is high while the
// current core is the final one.
//
// Coordinates are signed, CW+1 bits; img_w/img_h are sampled at init. Timing: sx/sy/last
// change on the clock edge at which init or next is high. The tiling follows the
// published segmentation; the raster order and the displacement port are this design's.
module segment_walker #(
  parameter int CW     = 12,  // bits of an image dimension
  parameter int CORE_W = 6,
  parameter int CORE_H = 6
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 init,
  input  logic                 next,
  input  logic [CW-1:0]        img_w,
  input  logic [CW-1:0]        img_h,
  input  logic [CW-1:0]        off_x,
  input  logic [CW-1:0]        off_y,
  output logic signed [CW+1:0] sx,
  output logic signed [CW+1:0] sy,
  output logic                 last
);

  localparam logic signed [CW+1:0] STEP_X = (CW+2)'(CORE_W);
  localparam logic signed [CW+1:0] STEP_Y = (CW+2)'(CORE_H);

  logic signed [CW+1:0] w, h, x0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sx <= '0;
      sy <= '0;
      w  <= '0;
      h  <= '0;
      x0 <= '0;
    end else if (init) begin
      w  <= (CW+2)'(img_w);
      h  <= (CW+2)'(img_h);
      x0 <= -(CW+2)'(off_x);
      sx <= -(CW+2)'(off_x);
      sy <= -(CW+2)'(off_y);
    end else if (next) begin
      if (sx + STEP_X >= w) begin
        sx <= x0;
        sy <= sy + STEP_Y;
      end else begin
        sx <= sx + STEP_X;
      end
    end
  end

  assign last = (sx + STEP_X >= w) && (sy + STEP_Y >= h);

endmodule
