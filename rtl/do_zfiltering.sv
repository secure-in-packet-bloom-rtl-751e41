// do_zfiltering -- turns each outgoing link's cipher output into a Bloom mask
// and tests whether the mask is contained in the in-packet Bloom filter.
//
// How it works: the first K*8 bits of the F3 output of a link are read as K
// 8-bit indices, most significant byte first; each index sets one bit of an
// M-bit mask (M = 256, K = 5). The link matches when (bf & mask) == mask,
// the LIPSIN forwarding rule. Index p denotes the p-th bit of the filter as it
// is carried in the packet, i.e. bf[M-1-p] when the filter's first byte is
// bf[M-1 -: 8]. Colliding indices give a mask with fewer than K ones.
//
// Interface and timing: with check high, match[l] (one bit per link, the
// forwarding bit vector) is registered and match_valid pulses in the next
// cycle: matching takes a single clock. The indexing of the cipher output and
// of the filter bits is this design's choice; the rule and the one-cycle
// match follow the document.
module do_zfiltering
  import zf_pkg::*;
#(
  parameter int LINKS = NUM_LINKS,
  parameter int M     = BF_M,
  parameter int K     = BF_K
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  check,
  input  logic [M-1:0]                          bf,
  input  logic [LINKS-1:0][K*$clog2(M)-1:0]     link_bits,
  output logic [LINKS-1:0]                      match,
  output logic                                  match_valid
);
  localparam int IW = $clog2(M);

  logic [LINKS-1:0][M-1:0] mask;
  logic [LINKS-1:0]        hit;

  always_comb begin
    for (int l = 0; l < LINKS; l++) begin
      mask[l] = '0;
      for (int j = 0; j < K; j++)
        mask[l][M-1-int'(link_bits[l][K*IW-1-IW*j -: IW])] = 1'b1;
      hit[l] = ((bf & mask[l]) == mask[l]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      match       <= '0;
      match_valid <= 1'b0;
    end else begin
      match_valid <= check;
      if (check) match <= hit;
    end
  end

endmodule
