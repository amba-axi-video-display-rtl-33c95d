// br_pixel_unpack: hands the display formatter one pixel per request.
//
// The FIFO delivers 64-bit words; a word holds 8/UNIT pixels in bus
// (little-endian) order, the pixel at the lowest address in the low bits.
// Lines start on a word boundary, so pixel x of a line sits in lane
// x mod (8/UNIT). The last word of a line may be padded; the unpacker
// counts pixels up to XSIZE and drops the rest of that word.
//
// Timing: pix_data is registered and valid the cycle after pix_req. A
// request with no word available returns zero, raises underflow for one
// cycle and does not advance (the image slips until the next frame's flush
// realigns it; recovery is this design's choice).
//
// From the document: pixels are handed to the display formatter on request.
// This design's choice: little-endian packing, lane selection, padding drop
// and the underflow flag (pixel 0, no advance).
module br_pixel_unpack #(
  parameter int unsigned UNIT = 4,             // bytes per pixel: 1 or 4
  localparam int unsigned PPW = 8 / UNIT,
  localparam int unsigned LW  = (PPW > 1) ? $clog2(PPW) : 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        flush,
  input  logic [15:0] xsize,
  input  logic        pix_req,
  output logic [31:0] pix_data,
  output logic        underflow,
  input  logic        word_valid,
  input  logic [63:0] word_data,
  output logic        word_pop
);
  logic [15:0]   x;
  logic [LW-1:0] lane;
  logic          last_in_row;
  logic [UNIT*8-1:0] lane_data;

  assign lane        = LW'(x % 16'(PPW));
  assign last_in_row = (x + 16'd1 >= xsize);
  assign lane_data   = word_data[int'(lane)*UNIT*8 +: UNIT*8];
  assign word_pop    = pix_req && word_valid && (int'(lane) == PPW - 1 || last_in_row);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; pix_data <= '0; underflow <= 1'b0;
    end else if (flush) begin
      x <= '0; underflow <= 1'b0;
    end else begin
      underflow <= 1'b0;
      if (pix_req) begin
        if (word_valid) begin
          pix_data <= 32'(lane_data);
          x        <= last_in_row ? '0 : x + 16'd1;
        end else begin
          pix_data  <= '0;
          underflow <= 1'b1;
        end
      end
    end
  end
endmodule
