// smu: Store Management Unit.
//
// Builds the L2 cache lines that a vector store writes to memory. The store
// buffers of the lanes deliver the source register in vector order, one
// 256-bit package (one ELEN word per lane) at a time; the SMU keeps them in
// a 64-byte internal buffer (pkg_line_buffer) and, for every store request of
// the request queue, takes the request's bytes out of the buffer and moves
// them to their place in the line with a four-stage combinational path:
//   1. barrel shifter: rotate the buffer right so that the byte at the read
//      pointer becomes byte 0 (log2(64) = 6 stages of 2:1 muxes, one per
//      pointer bit); bytes past the request's byte count are zeroed,
//   2. strider: spread the elements by |stride| / SEW element positions,
//      |stride| saturated at 64 bytes (unit-stride and indexed use 1),
//   3. shifter: shift left by elem_offset bytes,
//   4. inverter: reverse the element order (at SEW granularity) when the
//      stride is negative.
//
// Handshakes: the instruction arrives by mqueue_sync_start_i (implicit, only
// while the SMU is idle); requests and responses use valid/ack; packages
// from the store buffers use valid/ack, stbf_ack_o being raised only when the
// last bytes of a package are written or a whole package is dropped.
// A request is answered once its byte count (elem_cnt << vsew) is in the
// buffer, or at once when it is killed (data then not meaningful); vmot_id,
// kill, tag and line_mask are copied from the request. The response of the
// last (or a killed) request ends the instruction: in that same cycle the
// buffer is cleared and stbf_sync_end_o is raised for one cycle to reset the
// store buffers. Requests and responses are registered: a request accepted
// in cycle t can be answered in cycle t+1 at the earliest.
//
// The structure follows the source design; zeroing bytes beyond the request
// in stage 1, stride 0 treated as 1 and a combinational stbf_sync_end_o are
// this design's choices.
module smu
  import vlsu_pkg::*;
(
  input  logic             clk_i,
  input  logic             rsn_i,
  // address queue
  input  logic             mqueue_sync_start_i,
  input  mqueue2smu_t      mqueue_info_i,
  // request queue: requests
  input  logic             rqueue_req_valid_i,
  output logic             rqueue_req_ack_o,
  input  rqueue_smu_info_t rqueue_req_info_i,
  // request queue: responses
  output logic             rqueue_resp_valid_o,
  input  logic             rqueue_resp_ack_i,
  output smu_rqueue_resp_t rqueue_resp_info_o,
  // store buffers
  input  logic             stbf_valid_i,
  output logic             stbf_ack_o,
  input  buffers_data_t    stbf_data_i,
  output logic             stbf_sync_end_o
);

  localparam int unsigned NB = LINE_BYTES;

  // ------------------------------------------------------------------
  // Instruction and request info
  // ------------------------------------------------------------------
  logic             op_valid_q;
  mqueue2smu_t      mqueue_op_info_q;
  logic             req_valid_q;
  rqueue_smu_info_t rqueue_req_info_q;

  logic             resp_hs, instr_end, sb_rd;
  elem_count_t      rqueue_rd_byte_cnt;
  elem_count_t      sb_depth;

  assign rqueue_req_ack_o   = op_valid_q && !req_valid_q;
  assign rqueue_rd_byte_cnt = rqueue_req_info_q.elem_cnt << rqueue_req_info_q.vsew[1:0];

  assign rqueue_resp_valid_o = req_valid_q &&
                               (rqueue_req_info_q.kill || (sb_depth >= rqueue_rd_byte_cnt));
  assign resp_hs   = rqueue_resp_valid_o && rqueue_resp_ack_i;
  assign sb_rd     = resp_hs && !rqueue_req_info_q.kill;
  assign instr_end = resp_hs && (rqueue_req_info_q.kill || rqueue_req_info_q.last);
  assign stbf_sync_end_o = instr_end;

  always_ff @(posedge clk_i or negedge rsn_i) begin
    if (!rsn_i) begin
      op_valid_q        <= 1'b0;
      mqueue_op_info_q  <= '0;
      req_valid_q       <= 1'b0;
      rqueue_req_info_q <= '0;
    end else begin
      if (mqueue_sync_start_i) begin
        op_valid_q       <= 1'b1;
        mqueue_op_info_q <= mqueue_info_i;
      end else if (instr_end) begin
        op_valid_q       <= 1'b0;
        mqueue_op_info_q <= '0;
      end
      if (rqueue_req_valid_i && rqueue_req_ack_o) begin
        req_valid_q       <= 1'b1;
        rqueue_req_info_q <= rqueue_req_info_i;
      end else if (resp_hs) begin
        req_valid_q       <= 1'b0;
      end
    end
  end

  // ------------------------------------------------------------------
  // Internal buffer
  // ------------------------------------------------------------------
  logic [NB-1:0][7:0] st_buffer;
  l2_cache_line_idx_t sb_rd_pt_offset;
  elem_count_t        sb_free;
  logic               sb_full, sb_wr, sb_drop;

  pkg_line_buffer u_buffer (
    .clk_i       (clk_i),
    .rsn_i       (rsn_i),
    .start_i     (mqueue_sync_start_i),
    .start_row_i (mqueue_info_i.row),
    .clear_i     (instr_end),
    .active_i    (op_valid_q),
    .pkg_valid_i (stbf_valid_i),
    .pkg_ack_o   (stbf_ack_o),
    .pkg_data_i  (stbf_data_i),
    .rd_i        (sb_rd),
    .rd_cnt_i    (rqueue_rd_byte_cnt),
    .buf_o       (st_buffer),
    .rd_pos_o    (sb_rd_pt_offset),
    .depth_o     (sb_depth),
    .free_o      (sb_free),
    .full_o      (sb_full),
    .wr_o        (sb_wr),
    .drop_o      (sb_drop)
  );

  // ------------------------------------------------------------------
  // Combinational path
  // ------------------------------------------------------------------
  logic [LINE_IDX_W:0][NB-1:0][7:0] rot;        // barrel shifter stages
  logic [NB-1:0][7:0] data_shift, data_stride, data_offset, data_reversed;
  logic [LINE_IDX_W:0] stride_clamped;           // |stride| saturated at 64 bytes
  logic [LINE_IDX_W:0] stride_idx;               // stride in elements
  logic [1:0]          sew_log;
  logic                neg_stride;
  xlen_t               stride_abs;

  assign sew_log    = rqueue_req_info_q.vsew[1:0];
  assign neg_stride = (rqueue_req_info_q.opmode == OP_STRIDED) && rqueue_req_info_q.stride[XLEN-1];
  assign stride_abs = rqueue_req_info_q.stride[XLEN-1] ? -rqueue_req_info_q.stride
                                                       :  rqueue_req_info_q.stride;

  always_comb begin
    if (rqueue_req_info_q.opmode != OP_STRIDED)
      stride_clamped = (LINE_IDX_W+1)'(1) << sew_log;
    else if (stride_abs >= xlen_t'(NB))
      stride_clamped = (LINE_IDX_W+1)'(NB);
    else
      stride_clamped = stride_abs[LINE_IDX_W:0];
    stride_idx = stride_clamped >> sew_log;
    if (stride_idx == '0) stride_idx = 1;  // stride 0 is not supported
  end

  // barrel shifter: rotate right by the read pointer, one mux stage per bit
  assign rot[0] = st_buffer;
  for (genvar k = 0; k < LINE_IDX_W; k++) begin : g_rot
    for (genvar i = 0; i < NB; i++) begin : g_byte
      assign rot[k+1][i] = sb_rd_pt_offset[k] ? rot[k][(i + (1 << k)) % NB] : rot[k][i];
    end
  end

  always_comb begin
    for (int unsigned i = 0; i < NB; i++)
      data_shift[i] = (i < int'(rqueue_rd_byte_cnt)) ? rot[LINE_IDX_W][i] : 8'h00;
  end

  // strider: element j goes to element position j * stride_idx
  always_comb begin
    int unsigned w, n, dst;
    w = 1 << sew_log;
    n = NB >> sew_log;
    data_stride = '0;
    for (int unsigned j = 0; j < NB; j++) begin
      dst = j * int'(stride_idx);
      if (j < n && dst < n)
        for (int unsigned b = 0; b < 8; b++)
          if (b < w) data_stride[dst*w + b] = data_shift[j*w + b];
    end
  end

  // shifter: left by elem_offset bytes
  always_comb begin
    data_offset = data_stride << (8 * int'(rqueue_req_info_q.elem_offset));
  end

  // inverter: reverse element order for negative strides
  always_comb begin
    int unsigned w, n;
    w = 1 << sew_log;
    n = NB >> sew_log;
    data_reversed = data_offset;
    if (neg_stride) begin
      for (int unsigned e = 0; e < NB; e++)
        if (e < n)
          for (int unsigned b = 0; b < 8; b++)
            if (b < w) data_reversed[(n-1-e)*w + b] = data_offset[e*w + b];
    end
  end

  // ------------------------------------------------------------------
  // Store data response
  // ------------------------------------------------------------------
  always_comb begin
    rqueue_resp_info_o.vmot_id   = rqueue_req_info_q.vmot_id;
    rqueue_resp_info_o.kill      = rqueue_req_info_q.kill;
    rqueue_resp_info_o.tag       = rqueue_req_info_q.tag;
    rqueue_resp_info_o.line_mask = rqueue_req_info_q.line_mask;
    rqueue_resp_info_o.data      = l2_cache_line_t'(data_reversed);
  end

  // ------------------------------------------------------------------
  // Protocol rules
  // ------------------------------------------------------------------
  // the address queue starts an instruction only when the SMU is idle
  a_start_idle: assert property (@(posedge clk_i) disable iff (!rsn_i)
                                 mqueue_sync_start_i |-> !op_valid_q);
  // a response, once offered, stays until acknowledged
  a_resp_stable: assert property (@(posedge clk_i) disable iff (!rsn_i)
                                  rqueue_resp_valid_o && !rqueue_resp_ack_i |=> rqueue_resp_valid_o);
  // a request never asks for more than one line
  a_req_fits: assert property (@(posedge clk_i) disable iff (!rsn_i)
                               req_valid_q |-> rqueue_rd_byte_cnt <= elem_count_t'(NB));

endmodule
