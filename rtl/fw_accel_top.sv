// fw_accel_top: FPGA Floyd-Warshall tile kernel for blocked all-pairs
// shortest paths.
//
// The host splits an N x N distance matrix into B x B tiles and, round by
// round, asks this kernel to process sets of tiles of one kind (self-,
// row-, column- or doubly-dependent). For each tile it places in a source
// buffer the pivot rows, the pivot columns and the tile (3*B*B elements,
// laid out as described in fw_pkg), programs the registers, and writes the
// destination address, which starts the request. The I/O engine streams the
// source buffer in at L elements (one 64-bit beat) per cycle, the global PE
// control tags each beat, the array of B PEs applies all B iterations of
// the FW outer loop, and the B*B result elements of every tile are written
// to the destination buffer. When all are written, the done bit is set.
//
// Timing: every tile occupies the stream for 3*B*B/L cycles; successive
// tiles of a request overlap in the array, so k tiles take about
// k*3*B*B/L + B + a few cycles when the host link delivers a beat per
// cycle and accepts writes at once. If the result FIFO fills, the whole
// array and the control stall together.
//
// Structure (I/O engine, global PE control, B PEs of L operators, results
// returned from the last PE) and B = 32, L = 4, 16-bit distances follow the
// design description. The host-link protocol, register map and stream
// layout are this design's own.
module fw_accel_top
  import fw_pkg::*;
#(
  parameter int unsigned B  = 32,
  parameter int unsigned L  = 4,
  parameter int unsigned W  = 16,
  parameter int unsigned AW = 64
) (
  input  logic           clk,
  input  logic           rst_n,
  // host register access
  input  logic           reg_we,
  input  logic [2:0]     reg_waddr,
  input  logic [63:0]    reg_wdata,
  input  logic [2:0]     reg_raddr,
  output logic [63:0]    reg_rdata,
  // host memory (communication buffer) reads
  output logic           rd_req_valid,
  input  logic           rd_req_ready,
  output logic [AW-1:0]  rd_req_addr,
  input  logic           rd_rsp_valid,
  input  logic [L*W-1:0] rd_rsp_data,
  // host memory writes
  output logic           wr_valid,
  input  logic           wr_ready,
  output logic [AW-1:0]  wr_addr,
  output logic [L*W-1:0] wr_data
);
  logic                start, busy, done;
  logic [AW-1:0]       src_addr, dst_addr;
  logic [31:0]         src_words, dst_words, tiles_in;
  tile_kind_e          tile_kind;
  logic                en, res_space;
  logic                k_in_valid, k_in_ready;
  logic [L*W-1:0]      k_in_data;
  tag_t                a_in_tag, a_out_tag;
  logic [L-1:0][W-1:0] a_in_data, a_out_data;
  logic                res_push;

  fw_regs #(.AW(AW)) u_regs (
    .clk, .rst_n,
    .reg_we, .reg_waddr, .reg_wdata, .reg_raddr, .reg_rdata,
    .busy, .done, .tiles_in, .start,
    .src_addr, .src_words, .dst_addr, .dst_words, .tile_kind
  );

  fw_io_engine #(.L(L), .W(W), .AW(AW)) u_io (
    .clk, .rst_n,
    .start, .src_addr, .src_words, .dst_addr, .dst_words, .busy, .done,
    .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_rsp_valid, .rd_rsp_data,
    .wr_valid, .wr_ready, .wr_addr, .wr_data,
    .k_in_valid, .k_in_ready, .k_in_data,
    .res_push, .res_data(a_out_data), .res_space
  );

  // Global stall: nothing moves while the result FIFO is full.
  assign en = res_space;

  fw_global_ctrl #(.B(B), .L(L), .W(W)) u_ctrl (
    .clk, .rst_n, .start, .tile_kind, .en,
    .in_valid(k_in_valid), .in_data(k_in_data), .in_ready(k_in_ready),
    .out_tag(a_in_tag), .out_data(a_in_data), .tiles_in
  );

  fw_pe_array #(.B(B), .L(L), .W(W)) u_array (
    .clk, .rst_n, .en,
    .in_tag(a_in_tag), .in_data(a_in_data),
    .out_tag(a_out_tag), .out_data(a_out_data)
  );

  // Only the updated tile rows leave the kernel; pivot segments end here.
  assign res_push = en && a_out_tag.valid && (a_out_tag.seg == SEG_TILE);
endmodule
