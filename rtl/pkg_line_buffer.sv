// pkg_line_buffer: the internal buffer shared by the SMU and the IMU.
//
// It collects the 256-bit data packages that the lane buffers deliver in
// vector order (one ELEN word per lane, package k holds bytes 32k..32k+31 of
// the register line stream) into a circular byte buffer the size of one L2
// cache line (64 bytes = 2 entries of 32 bytes). Byte i of the stream always
// lands in slot i mod 64, so a package maps onto exactly one entry and is
// written without shifting; only the byte-enable mask (sb_wr_mask) varies.
//
// Start of an instruction (start_i) loads the row offset: the number of
// stream bytes that precede the first valid element. Whole packages below
// the row offset are acknowledged and dropped without writing; in the first
// kept package the bytes below the offset are masked off. Both the write and
// the read pointer start at row mod 64.
//
// Write: each cycle up to min(bytes left in the package, free bytes) are
// written into entry wr_pos[5] at offset wr_pos[4:0]; pkg_ack_o is asserted
// only in the cycle that writes the last bytes of the package (or drops it).
// Read: rd_i consumes rd_cnt_i bytes from rd_pos_o; the owner checks that
// depth_o >= rd_cnt_i first. clear_i (end of instruction) empties the buffer.
// All state updates on the rising clock edge; rsn_i is active-low async.
// Packages are accepted only while active_i (instruction valid) is high.
module pkg_line_buffer
  import vlsu_pkg::*;
(
  input  logic                clk_i,
  input  logic                rsn_i,
  input  logic                start_i,
  input  row_t                start_row_i,
  input  logic                clear_i,
  input  logic                active_i,
  input  logic                pkg_valid_i,
  output logic                pkg_ack_o,
  input  buffers_data_t       pkg_data_i,
  input  logic                rd_i,
  input  elem_count_t         rd_cnt_i,
  output logic [LINE_BYTES-1:0][7:0] buf_o,
  output l2_cache_line_idx_t  rd_pos_o,
  output elem_count_t         depth_o,
  output elem_count_t         free_o,
  output logic                full_o,
  output logic                wr_o,
  output logic                drop_o
);

  logic [LINE_BYTES-1:0][7:0] sb_q;
  row_t                       row_q;       // bytes still to be skipped
  l2_cache_line_idx_t         wr_pos_q;    // {sb_wr_pt_q, sb_wr_pt_offset_q}
  l2_cache_line_idx_t         rd_pos_q;    // sb_rd_pt_offset_q
  elem_count_t                depth_q;     // sb_depth_q, bytes

  logic                       sb_wr_pt;
  logic [PKG_IDX_W-1:0]       sb_wr_pt_offset;
  all_lanes_bytes_num_t       sb_wr_remaining_cnt;
  all_lanes_bytes_num_t       sb_wr_current_cnt;
  logic [PKG_BYTES-1:0]       sb_wr_mask;
  elem_count_t                sb_free;
  logic                       drop, sb_wr;

  assign sb_wr_pt        = wr_pos_q[LINE_IDX_W-1];
  assign sb_wr_pt_offset = wr_pos_q[PKG_IDX_W-1:0];
  assign sb_free         = elem_count_t'(LINE_BYTES) - depth_q;

  // bytes of the current package not yet written
  assign sb_wr_remaining_cnt = all_lanes_bytes_num_t'(PKG_BYTES) - all_lanes_bytes_num_t'(sb_wr_pt_offset);

  always_comb begin
    drop              = 1'b0;
    sb_wr             = 1'b0;
    sb_wr_current_cnt = '0;
    sb_wr_mask        = '0;
    pkg_ack_o         = 1'b0;
    if (active_i && pkg_valid_i) begin
      if (row_q >= row_t'(PKG_BYTES)) begin
        drop      = 1'b1;
        pkg_ack_o = 1'b1;
      end else if (sb_free != '0) begin
        sb_wr = 1'b1;
        if (elem_count_t'(sb_wr_remaining_cnt) <= sb_free)
          sb_wr_current_cnt = sb_wr_remaining_cnt;
        else
          sb_wr_current_cnt = all_lanes_bytes_num_t'(sb_free);
        for (int unsigned i = 0; i < PKG_BYTES; i++)
          sb_wr_mask[i] = (i >= int'(sb_wr_pt_offset)) &&
                          (i <  int'(sb_wr_pt_offset) + int'(sb_wr_current_cnt));
        pkg_ack_o = (sb_wr_current_cnt == sb_wr_remaining_cnt);
      end
    end
  end

  always_ff @(posedge clk_i or negedge rsn_i) begin
    if (!rsn_i) begin
      sb_q     <= '0;
      row_q    <= '0;
      wr_pos_q <= '0;
      rd_pos_q <= '0;
      depth_q  <= '0;
    end else if (start_i) begin
      row_q    <= start_row_i;
      wr_pos_q <= l2_cache_line_idx_t'(start_row_i);
      rd_pos_q <= l2_cache_line_idx_t'(start_row_i);
      depth_q  <= '0;
    end else if (clear_i) begin
      row_q    <= '0;
      wr_pos_q <= '0;
      rd_pos_q <= '0;
      depth_q  <= '0;
    end else begin
      if (drop) row_q <= row_q - row_t'(PKG_BYTES);
      if (sb_wr) begin
        for (int unsigned i = 0; i < PKG_BYTES; i++)
          if (sb_wr_mask[i]) sb_q[{sb_wr_pt, PKG_IDX_W'(i)}] <= pkg_data_i[8*i +: 8];
        wr_pos_q <= wr_pos_q + l2_cache_line_idx_t'(sb_wr_current_cnt);
      end
      if (rd_i) rd_pos_q <= rd_pos_q + l2_cache_line_idx_t'(rd_cnt_i);
      depth_q <= depth_q + (sb_wr ? elem_count_t'(sb_wr_current_cnt) : '0)
                         - (rd_i ? rd_cnt_i : '0);
    end
  end

  assign buf_o    = sb_q;
  assign rd_pos_o = rd_pos_q;
  assign depth_o  = depth_q;
  assign free_o   = sb_free;
  assign full_o   = (depth_q == elem_count_t'(LINE_BYTES));
  assign wr_o     = sb_wr;
  assign drop_o   = drop;

  // a read never takes more than is buffered
  a_rd_le_depth: assert property (@(posedge clk_i) disable iff (!rsn_i)
                                  rd_i |-> rd_cnt_i <= depth_q);

endmodule
