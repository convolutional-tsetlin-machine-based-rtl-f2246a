// patch_gen: window sliding for the 2x2 convolution over a 4x4 Boolean image.
//
// The image is held in four 4-bit row registers (bit x of a row is column x,
// row 0 is the uppermost). The 2x2 window is fixed on columns 0..1 of rows 0
// and 1; patches are produced by moving the data, not the window. Between
// patches of one row pair the two upper rows rotate one place towards the
// window. After the third patch of a row pair, row 1 (rotated back by two
// places) moves up into row 0 and the rows below move up by one. One patch is
// produced per clock, B = 9 per image, with no gap between images: 'load' in
// the cycle of the last patch (or while idle) puts a new image in the rows
// and its patch 0 appears in the next cycle.
//
// Feature vector (8 bits): feat[3:0] = window pixels {(1,1),(0,1),(1,0),(0,0)}
// (x,y relative to the window), feat[7:6] = x-position code and feat[5:4] =
// y-position code, with codes 2'b10, 2'b01, 2'b00 for position 0, 1, 2
// (the position table of the source). The register structure follows the
// source; the bit ordering inside the feature vector is this design's choice.
// The label of the image is carried alongside and stays stable until the next
// load. Image bit y*4+x is pixel (x,y).
module patch_gen
  import ctm_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic [IMG_BITS-1:0]  img,
  input  logic                 label,
  output logic                 valid_o,   // a patch is on feat_o this cycle
  output logic                 first_o,   // patch 0 of the image
  output logic                 last_o,    // patch B-1 of the image
  output feat_t                feat_o,
  output logic                 label_o
);

  logic [IMG_X-1:0] row [IMG_Y];
  logic [1:0]       px, py;
  logic             valid_q;
  logic             label_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < IMG_Y; r++) row[r] <= '0;
      px      <= '0;
      py      <= '0;
      valid_q <= 1'b0;
      label_q <= 1'b0;
    end else if (load) begin
      for (int r = 0; r < IMG_Y; r++) row[r] <= img[r*IMG_X +: IMG_X];
      px      <= '0;
      py      <= '0;
      valid_q <= 1'b1;
      label_q <= label;
    end else if (valid_q) begin
      if (px != 2'(BX - 1)) begin
        // slide the two upper rows one place towards the window
        row[0] <= {row[0][0], row[0][IMG_X-1:1]};
        row[1] <= {row[1][0], row[1][IMG_X-1:1]};
        px     <= px + 2'd1;
      end else if (py != 2'(BY - 1)) begin
        // next row pair: row 1 back to its original alignment, move up
        row[0] <= {row[1][IMG_X-3:0], row[1][IMG_X-1:IMG_X-2]};
        for (int r = 1; r < IMG_Y - 1; r++) row[r] <= row[r+1];
        px     <= '0;
        py     <= py + 2'd1;
      end else begin
        valid_q <= 1'b0;   // image done, no new one loaded
      end
    end
  end

  assign valid_o = valid_q;
  assign first_o = valid_q && px == '0 && py == '0;
  assign last_o  = valid_q && px == 2'(BX - 1) && py == 2'(BY - 1);
  assign label_o = label_q;
  assign feat_o  = {pos_code(32'(px)), pos_code(32'(py)),
                    row[1][1], row[1][0], row[0][1], row[0][0]};

endmodule
