// spam_pixel_addr_gen: scan address generator of the SPAM extractor.
//
// After a one-cycle start pulse it walks the image in raster order, one
// 32-bit word (four pixels) per cycle: row r = 0..ROWS-1, word w =
// 0..COLS/4-1. Each cycle it drives ADD1, the word of row r, and ADD2, the
// same word of row r+1 (on the last row, where no row r+1 exists, ADD2 repeats
// ADD1 and the tag marks the second row absent). A full scan therefore takes
// exactly ROWS*COLS/4 cycles, 2^16 for a 512 x 512 image.
//
// The tag outputs (tag_valid, tag_row, tag_word) are delayed by one cycle so
// that they line up with the synchronous memory's read data. scan_done pulses
// in the cycle the last tag is valid. The raster order and the tag are this
// design's choices; the architecture only states that an address generator
// selects the words of rows i and i+1.
module spam_pixel_addr_gen #(
  parameter int unsigned ROWS = 512,
  parameter int unsigned COLS = 512,
  localparam int unsigned WORDS = COLS / 4,
  localparam int unsigned AW = $clog2(ROWS * WORDS),
  localparam int unsigned RW = $clog2(ROWS),
  localparam int unsigned WW = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic [AW-1:0] add1,
  output logic [AW-1:0] add2,
  output logic          busy,
  output logic          tag_valid,
  output logic [RW-1:0] tag_row,
  output logic [WW-1:0] tag_word,
  output logic          scan_done
);

  logic [RW-1:0] row;
  logic [WW-1:0] word;
  logic          last_word, last_row;

  assign last_word = (word == WW'(WORDS - 1));
  assign last_row  = (row == RW'(ROWS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      row  <= '0;
      word <= '0;
    end else if (start && !busy) begin
      busy <= 1'b1;
      row  <= '0;
      word <= '0;
    end else if (busy) begin
      if (last_word) begin
        word <= '0;
        if (last_row) busy <= 1'b0;
        else          row  <= row + 1'b1;
      end else begin
        word <= word + 1'b1;
      end
    end
  end

  always_comb begin
    add1 = AW'(row) * AW'(WORDS) + AW'(word);
    add2 = last_row ? add1 : add1 + AW'(WORDS);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag_valid <= 1'b0;
      tag_row   <= '0;
      tag_word  <= '0;
      scan_done <= 1'b0;
    end else begin
      tag_valid <= busy;
      tag_row   <= row;
      tag_word  <= word;
      scan_done <= busy && last_word && last_row;
    end
  end

endmodule
