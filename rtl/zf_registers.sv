// zf_registers -- register-bus slave of the output port selector: holds the
// per-flow key K3 and the O2 value set written by the management software,
// and reports status and packet counters.
//
// The register bus is a chain through all modules of the pipeline. A request
// (req high for one cycle, ack low) whose address falls in this block's
// window of 64 words at BASE_ADDR is served: a write (rd_wr_l low) stores the
// 32-bit data, a read returns the register; the reply leaves on the output
// side with ack high and every other field copied. Requests for other
// addresses, and replies already acknowledged upstream, pass unchanged. The
// output is registered, one clock from input to output.
//
// Word map (offsets): 0..7 K3 (word 0 = K3[255:224]); 8 + 8*l + w the O2 value
// of link l (word 0 = O2[255:224]); 40 status (bit 0: cipher initialized);
// 41 forwarded-packet count; 42 dropped-packet count. keys_written pulses one
// cycle after any write to K3 or O2 so that a cipher needing it can
// re-initialize. The bus fields and their widths follow the document; the
// base address and word map are this design's choice.
module zf_registers
  import zf_pkg::*;
#(
  parameter logic [REG_ADDR_W-1:0] BASE_ADDR = 23'h040000,
  parameter int                    LINKS     = NUM_LINKS
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  reg_bus_t                      reg_in,
  output reg_bus_t                      reg_out,
  output logic [KEY_BITS-1:0]           k3,
  output logic [LINKS-1:0][O2_BITS-1:0] o2,
  output logic                          keys_written,
  input  logic                          initialized,
  input  logic [31:0]                   fwd_count,
  input  logic [31:0]                   drop_count
);
  localparam int OFF_W = 6;

  logic              hit;
  logic [OFF_W-1:0]  off;
  logic [31:0]       rdata;

  assign hit = reg_in.req && !reg_in.ack &&
               (reg_in.addr[REG_ADDR_W-1:OFF_W] == BASE_ADDR[REG_ADDR_W-1:OFF_W]);
  assign off = reg_in.addr[OFF_W-1:0];

  always_comb begin
    rdata = 32'h0;
    if (int'(off) < O2_OFF)
      rdata = k3[KEY_BITS-1-32*int'(off) -: 32];
    else if (int'(off) < STATUS_OFF)
      rdata = o2[(int'(off)-O2_OFF)/8][O2_BITS-1-32*((int'(off)-O2_OFF)%8) -: 32];
    else if (int'(off) == STATUS_OFF)
      rdata = {31'h0, initialized};
    else if (int'(off) == FWD_CNT_OFF)
      rdata = fwd_count;
    else if (int'(off) == DROP_CNT_OFF)
      rdata = drop_count;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_out      <= '0;
      k3           <= '0;
      o2           <= '0;
      keys_written <= 1'b0;
    end else begin
      reg_out      <= reg_in;
      keys_written <= 1'b0;
      if (hit) begin
        reg_out.ack <= 1'b1;
        if (reg_in.rd_wr_l) begin
          reg_out.data <= rdata;
        end else if (int'(off) < STATUS_OFF) begin
          keys_written <= 1'b1;
          if (int'(off) < O2_OFF)
            k3[KEY_BITS-1-32*int'(off) -: 32] <= reg_in.data;
          else
            o2[(int'(off)-O2_OFF)/8][O2_BITS-1-32*((int'(off)-O2_OFF)%8) -: 32] <= reg_in.data;
        end
      end
    end
  end

endmodule
