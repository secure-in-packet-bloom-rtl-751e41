// bit_counter -- counts the ones of the in-packet Bloom filter and flags a
// filter that has more than MAX_ONES of them.
//
// A filter with (nearly) all bits set would match every link identifier, so a
// packet whose filter holds more ones than the allowed constant is dropped.
// The count is a purely combinational population count of one 64-bit bus word
// per cycle, accumulated over the four words of the 256-bit filter.
//
// Interface and timing: clear (first word of a packet) resets the sum; every
// cycle with word_valid adds the ones of word. count and too_many are
// registered and valid one clock after the last word, i.e. 4 clocks after the
// first filter word. The 64-bit-per-cycle structure follows the document; the
// limit MAX_ONES = 128 (half of m = 256) is this design's choice, the document
// only calls it a constant.
module bit_counter #(
  parameter int W        = 64,
  parameter int CNT_W    = 9,
  parameter int MAX_ONES = 128
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             word_valid,
  input  logic [W-1:0]     word,
  output logic [CNT_W-1:0] count,
  output logic             too_many
);

  logic [$clog2(W+1)-1:0] ones;

  always_comb begin
    ones = '0;
    for (int b = 0; b < W; b++) ones = ones + $bits(ones)'(word[b]);
  end

  assign too_many = (int'(count) > MAX_ONES);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else if (clear) count <= word_valid ? CNT_W'(ones) : '0;
    else if (word_valid) count <= count + CNT_W'(ones);
  end

endmodule
