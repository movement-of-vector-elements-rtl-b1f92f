// imu: Index Management Unit.
//
// Supplies the address generation unit (AGU) with the index elements of an
// indexed vector memory instruction, one per handshake, sign-extended to
// ELEN. The index buffers of the lanes deliver the index register in vector
// order as 256-bit packages (one ELEN word per lane); the IMU keeps them in
// the same 64-byte internal buffer as the SMU (pkg_line_buffer), including
// the dropping of packages and bytes that lie before the row offset given
// with the instruction (mqueue_cnt_row_q).
//
// Datapath (combinational, two stages):
//   1. shifter: the buffer is shifted so that the byte at the read pointer
//      becomes byte 0 (bytes shifted in are zero); the low ELEN bits are kept,
//   2. sign extension from SEW (8/16/32/64) to 64 bits.
// agu_index_valid_o = instruction valid && buffered bytes >= SEW bytes; every
// agu_index_ack_i consumes SEW bytes. The instruction is ended by the address
// queue with mqueue_sync_end_i, which invalidates it and empties the buffer
// (the address queue is the one that knows when the AGU has all indexes).
// The index buffers are reset by the same signal at the top level.
// All state is registered; the output is valid from the cycle after the
// package holding the element has been written.
module imu
  import vlsu_pkg::*;
(
  input  logic          clk_i,
  input  logic          rsn_i,
  // address queue
  input  logic          mqueue_sync_start_i,
  input  mqueue2imu_t   mqueue_info_i,
  input  logic          mqueue_sync_end_i,
  // address generation unit
  output logic          agu_index_valid_o,
  input  logic          agu_index_ack_i,
  output elen_t         agu_index_o,
  // index buffers
  input  logic          idxbf_valid_i,
  output logic          idxbf_ack_o,
  input  buffers_data_t idxbf_data_i
);

  localparam int unsigned NB = LINE_BYTES;

  logic        op_valid_q;
  vsew_e       mqueue_vsew_q;
  elem_count_t ib_depth, ib_free, rd_cnt;
  logic        ib_full, ib_wr, ib_drop, ib_rd;
  logic [NB-1:0][7:0]  ib_buffer, shift_data;
  l2_cache_line_idx_t  ib_rd_pt_offset;

  always_ff @(posedge clk_i or negedge rsn_i) begin
    if (!rsn_i) begin
      op_valid_q    <= 1'b0;
      mqueue_vsew_q <= SEW8;
    end else if (mqueue_sync_start_i) begin
      op_valid_q    <= 1'b1;
      mqueue_vsew_q <= mqueue_info_i.vsew;
    end else if (mqueue_sync_end_i) begin
      op_valid_q    <= 1'b0;
    end
  end

  assign rd_cnt            = vsew_bytes(mqueue_vsew_q);
  assign agu_index_valid_o = op_valid_q && (ib_depth >= rd_cnt);
  assign ib_rd             = agu_index_valid_o && agu_index_ack_i && !mqueue_sync_end_i;

  pkg_line_buffer u_buffer (
    .clk_i       (clk_i),
    .rsn_i       (rsn_i),
    .start_i     (mqueue_sync_start_i),
    .start_row_i (mqueue_info_i.row),
    .clear_i     (mqueue_sync_end_i),
    .active_i    (op_valid_q && !mqueue_sync_end_i),
    .pkg_valid_i (idxbf_valid_i),
    .pkg_ack_o   (idxbf_ack_o),
    .pkg_data_i  (idxbf_data_i),
    .rd_i        (ib_rd),
    .rd_cnt_i    (rd_cnt),
    .buf_o       (ib_buffer),
    .rd_pos_o    (ib_rd_pt_offset),
    .depth_o     (ib_depth),
    .free_o      (ib_free),
    .full_o      (ib_full),
    .wr_o        (ib_wr),
    .drop_o      (ib_drop)
  );

  // shifter: byte at the read pointer to byte 0, zeros shifted in
  assign shift_data = ib_buffer >> (8 * int'(ib_rd_pt_offset));

  // sign extension
  always_comb begin
    elen_t raw;
    raw = elen_t'(shift_data);
    unique case (mqueue_vsew_q)
      SEW8:    agu_index_o = {{(ELEN-8){raw[7]}},   raw[7:0]};
      SEW16:   agu_index_o = {{(ELEN-16){raw[15]}}, raw[15:0]};
      SEW32:   agu_index_o = {{(ELEN-32){raw[31]}}, raw[31:0]};
      default: agu_index_o = raw;
    endcase
  end

  a_start_idle: assert property (@(posedge clk_i) disable iff (!rsn_i)
                                 mqueue_sync_start_i |-> !op_valid_q);

endmodule
