// stream_padder: adds a border of zero pixels around a feature map stream.
//
// The input is a feature map sent row by row, one pixel per valid/ready
// transfer, img_w x img_h pixels. The output is the same map with pad_lo zero
// pixels before and pad_hi zero pixels after every row and column, i.e.
// (img_w+pad_lo+pad_hi) x (img_h+pad_lo+pad_hi) pixels. Border pixels are
// produced without consuming input; interior pixels pass straight through
// (combinational valid/data, ready passed back). Border pixels do not wait
// for input, so after one image the block runs on into the leading border of
// the next; the configuration may therefore change only across a reset.
// With both pads 0 the block is a wire. Padding is not part of the design description; this block lets
// the CONV layers realise padded ("same") convolutions. A zero pixel encodes
// -1 on binary layers and the value 0 on the 8-bit input layer.
module stream_padder #(
  parameter int PIX_W = 24
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [15:0]      img_w,
  input  logic [15:0]      img_h,
  input  logic [3:0]       pad_lo,
  input  logic [3:0]       pad_hi,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [PIX_W-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [PIX_W-1:0] out_data
);

  logic [15:0] row, col, full_w, full_h;
  logic        interior;

  assign full_w = img_w + 16'(pad_lo) + 16'(pad_hi);
  assign full_h = img_h + 16'(pad_lo) + 16'(pad_hi);
  assign interior = (row >= 16'(pad_lo)) && (row < 16'(pad_lo) + img_h) &&
                  (col >= 16'(pad_lo)) && (col < 16'(pad_lo) + img_w);

  assign out_valid = interior ? in_valid : 1'b1;
  assign out_data  = interior ? in_data  : '0;
  assign in_ready  = interior & out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row <= '0;
      col <= '0;
    end else if (out_valid && out_ready) begin
      if (col == full_w - 1'b1) begin
        col <= '0;
        row <= (row == full_h - 1'b1) ? '0 : row + 1'b1;
      end else begin
        col <= col + 1'b1;
      end
    end
  end

endmodule
