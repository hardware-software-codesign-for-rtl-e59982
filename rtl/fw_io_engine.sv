// fw_io_engine: moves tiles between the host communication buffer and the
// kernel.
//
// After start, it reads src_words beats from consecutive addresses starting
// at src_addr (8-byte beats of L elements) and offers them to the kernel,
// and it writes the result beats the kernel delivers to consecutive
// addresses starting at dst_addr. When dst_words beats have been written,
// busy drops and done rises; done stays high until the next start.
//
// Host side: rd_req_valid/rd_req_ready/rd_req_addr issue reads; their data
// returns in order on rd_rsp_valid/rd_rsp_data with no back-pressure, so a
// read is issued only when the input FIFO can take every outstanding
// response. Writes use wr_valid/wr_ready/wr_addr/wr_data.
// Kernel side: k_in_valid/k_in_ready/k_in_data carries read beats into the
// kernel; res_push/res_data takes result beats, and res_space tells the
// kernel that the result FIFO has room (the kernel stalls otherwise).
//
// Reads, computation and writes all overlap, so a request of many tiles
// streams at one beat per cycle when the host link keeps up. Moving data of
// a given length to and from contiguous buffer regions follows the design
// description; the request/response protocol stands in for the host link,
// whose signals are not described.
module fw_io_engine #(
  parameter int unsigned L          = 4,
  parameter int unsigned W          = 16,
  parameter int unsigned AW         = 64,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  // request
  input  logic            start,
  input  logic [AW-1:0]   src_addr,
  input  logic [31:0]     src_words,
  input  logic [AW-1:0]   dst_addr,
  input  logic [31:0]     dst_words,
  output logic            busy,
  output logic            done,
  // host memory reads
  output logic            rd_req_valid,
  input  logic            rd_req_ready,
  output logic [AW-1:0]   rd_req_addr,
  input  logic            rd_rsp_valid,
  input  logic [L*W-1:0]  rd_rsp_data,
  // host memory writes
  output logic            wr_valid,
  input  logic            wr_ready,
  output logic [AW-1:0]   wr_addr,
  output logic [L*W-1:0]  wr_data,
  // kernel input
  output logic            k_in_valid,
  input  logic            k_in_ready,
  output logic [L*W-1:0]  k_in_data,
  // kernel results
  input  logic            res_push,
  input  logic [L*W-1:0]  res_data,
  output logic            res_space
);
  localparam int unsigned CW    = $clog2(FIFO_DEPTH) + 1;
  localparam int unsigned BYTES = (L * W) / 8;

  logic [31:0]   rd_issued, wr_done_cnt;
  logic [CW-1:0] credits;        // outstanding reads + beats in the input FIFO
  logic          in_empty, in_full, out_empty, out_full;
  logic [CW-1:0] in_count, out_count;
  logic          rd_fire, k_fire, wr_fire;

  assign rd_req_valid = busy && (rd_issued < src_words) && (credits < CW'(FIFO_DEPTH));
  assign rd_req_addr  = src_addr + AW'(rd_issued) * AW'(BYTES);
  assign rd_fire      = rd_req_valid && rd_req_ready;

  fw_fifo #(.WIDTH(L*W), .DEPTH(FIFO_DEPTH)) u_in_fifo (
    .clk, .rst_n, .clear(start),
    .push(rd_rsp_valid), .din(rd_rsp_data),
    .pop(k_fire), .dout(k_in_data),
    .empty(in_empty), .full(in_full), .count(in_count)
  );

  assign k_in_valid = !in_empty;
  assign k_fire     = k_in_valid && k_in_ready;

  fw_fifo #(.WIDTH(L*W), .DEPTH(FIFO_DEPTH)) u_out_fifo (
    .clk, .rst_n, .clear(start),
    .push(res_push), .din(res_data),
    .pop(wr_fire), .dout(wr_data),
    .empty(out_empty), .full(out_full), .count(out_count)
  );

  assign res_space = !out_full;
  assign wr_valid  = busy && !out_empty;
  assign wr_addr   = dst_addr + AW'(wr_done_cnt) * AW'(BYTES);
  assign wr_fire   = wr_valid && wr_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      done        <= 1'b0;
      rd_issued   <= '0;
      wr_done_cnt <= '0;
      credits     <= '0;
    end else if (start) begin
      busy        <= 1'b1;
      done        <= 1'b0;
      rd_issued   <= '0;
      wr_done_cnt <= '0;
      credits     <= '0;
    end else begin
      if (rd_fire) rd_issued <= rd_issued + 32'd1;
      credits <= credits + CW'(rd_fire) - CW'(k_fire);
      if (wr_fire) begin
        wr_done_cnt <= wr_done_cnt + 32'd1;
        if (wr_done_cnt + 32'd1 == dst_words) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // Read data never arrives without a matching request, so it always fits.
  a_rsp_fits: assert property (@(posedge clk) disable iff (!rst_n) rd_rsp_valid |-> !in_full);
  // A write request holds its address and data until it is accepted.
  a_wr_stable: assert property (@(posedge clk) disable iff (!rst_n || start)
    (wr_valid && !wr_ready) |=> (wr_valid && $stable(wr_addr) && $stable(wr_data)));
endmodule
