// fw_regs: host-visible control and status registers of the kernel.
//
// The host writes the source buffer address and length, the destination
// length and the tile kind, then the destination buffer address; that last
// write starts the request (start is a one-cycle pulse the cycle after the
// write). The host then polls the done bit of STATUS. Registers are 64 bits,
// addressed by word index (see fw_pkg for the map). Reads are combinational.
//
// Starting on the destination-address write and polling a done bit follow
// the design description; the register map, widths and the clearing of done
// on the next start (a pending start already reads as busy, not done) are
// this design's choices.
module fw_regs
  import fw_pkg::*;
#(
  parameter int unsigned AW = 64
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          reg_we,
  input  logic [2:0]    reg_waddr,
  input  logic [63:0]   reg_wdata,
  input  logic [2:0]    reg_raddr,
  output logic [63:0]   reg_rdata,
  input  logic          busy,
  input  logic          done,
  input  logic [31:0]   tiles_in,
  output logic          start,
  output logic [AW-1:0] src_addr,
  output logic [31:0]   src_words,
  output logic [AW-1:0] dst_addr,
  output logic [31:0]   dst_words,
  output tile_kind_e    tile_kind
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src_addr  <= '0;
      src_words <= '0;
      dst_addr  <= '0;
      dst_words <= '0;
      tile_kind <= TILE_SELF;
      start     <= 1'b0;
    end else begin
      start <= 1'b0;
      if (reg_we) begin
        unique case (reg_waddr)
          REG_SRC_ADDR:  src_addr  <= AW'(reg_wdata);
          REG_SRC_WORDS: src_words <= reg_wdata[31:0];
          REG_DST_WORDS: dst_words <= reg_wdata[31:0];
          REG_TILE_KIND: tile_kind <= tile_kind_e'(reg_wdata[1:0]);
          REG_DST_ADDR: begin
            dst_addr <= AW'(reg_wdata);
            start    <= 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (reg_raddr)
      REG_SRC_ADDR:  reg_rdata = 64'(src_addr);
      REG_SRC_WORDS: reg_rdata = {32'd0, src_words};
      REG_DST_WORDS: reg_rdata = {32'd0, dst_words};
      REG_TILE_KIND: reg_rdata = {62'd0, tile_kind};
      REG_DST_ADDR:  reg_rdata = 64'(dst_addr);
      REG_STATUS:    reg_rdata = {tiles_in, 30'd0, busy | start, done && !start};
      default:       reg_rdata = '0;
    endcase
  end
endmodule
