// store_buffer: per-lane store buffer (STBF).
//
// Serialises one lane's slice of the source register of a vector store
// towards the SMU. The VRF is read one line at a time (one ELEN cell from
// each of the N_BANKS banks, i.e. five VRF ports at once); the SMU takes one
// ELEN word per handshake. Three pipeline stages:
//   comb   : holds the line offset and physical register of the next line
//            (cases invalid / new / hold / next). A new instruction loads
//            mqueue_info_i; every granted VRF request moves to the next line.
//            It holds while its request is not granted (vrf_req_o && !vrf_resp_i)
//            or while the VRF stage holds.
//   VRF    : per-bank addresses vrf_addr_calc[b] = vrf_mapping(preg, b) +
//            line offset. The VRF answers a granted request with the line one
//            cycle later (already shuffled into cell order). The stage holds
//            the line while the buffer has no free entry (vrf_valid_q && sb_full).
//   buffer : ST_BF_SIZE entries of one line each, written a whole line at a
//            time at sb_wr_pt_q, read one ELEN word at a time at
//            {sb_rd_pt_q, sb_rd_pt_offset_q}. smu_data_o is the word at the
//            read pointer; smu_valid_o = !sb_empty.
// smu_sync_end_i (from the SMU, end of the store) invalidates the comb and
// VRF stages and empties the buffer; a start in the same cycle wins.
//
// Follows the source design; two choices are this design's own: the VRF
// request is also withheld while the VRF stage holds (otherwise a line
// granted in that cycle would have nowhere to go), and the buffer counts as
// full while it cannot take a whole line.
module store_buffer
  import vlsu_pkg::*;
(
  input  logic          clk_i,
  input  logic          rsn_i,
  // address queue
  input  logic          mqueue_sync_start_i,
  input  mqueue2stbf_t  mqueue_info_i,
  // vector register file
  output logic          vrf_req_o,
  input  logic          vrf_resp_i,
  output stbf2vrf_t     vrf_info_o,
  input  st_buff_data_t vrf_data_i,
  // store management unit
  output logic          smu_valid_o,
  input  logic          smu_ack_i,
  output elen_t         smu_data_o,
  input  logic          smu_sync_end_i
);

  localparam int unsigned DEPTH_W = $clog2(STBF_DEPTH + 1);
  localparam int unsigned PT_W    = (ST_BF_SIZE > 1) ? $clog2(ST_BF_SIZE) : 1;

  // ---------------- comb stage ----------------
  logic  comb_valid_q;
  row_t  comb_line_offset_q;
  preg_t comb_phy_reg_q;
  logic  comb_hold, vrf_hold, granted;

  // ---------------- VRF stage -----------------
  logic          vrf_valid_q;
  logic          vrf_held_q;        // line kept from an earlier cycle
  st_buff_data_t vrf_data_q, vrf_data;
  row_t          vrf_line_offset;
  preg_t         vrf_phy_reg;
  vrf_addr_t [N_BANKS-1:0] vrf_addr_calc;

  // ---------------- buffer stage --------------
  st_buff_data_t [ST_BF_SIZE-1:0] st_buffer;
  logic [PT_W-1:0]      sb_wr_pt_q, sb_rd_pt_q;
  logic [BANK_ID_W-1:0] sb_rd_pt_offset_q;
  logic [DEPTH_W-1:0]   sb_depth_q;
  logic                 sb_full, sb_empty, sb_wr, sb_rd;
  logic                 buffer_valid;
  st_buff_data_t        buffer_data;

  // ------------------------------------------------------------------
  // comb stage
  // ------------------------------------------------------------------
  assign vrf_hold  = vrf_valid_q && sb_full;
  assign vrf_req_o = comb_valid_q && !vrf_hold;
  assign granted   = vrf_req_o && vrf_resp_i;
  assign comb_hold = (vrf_req_o && !vrf_resp_i) || vrf_hold;

  always_ff @(posedge clk_i or negedge rsn_i) begin
    if (!rsn_i) begin
      comb_valid_q       <= 1'b0;
      comb_line_offset_q <= '0;
      comb_phy_reg_q     <= '0;
    end else if (mqueue_sync_start_i) begin              // new
      comb_valid_q       <= 1'b1;
      comb_line_offset_q <= mqueue_info_i.line_offset;
      comb_phy_reg_q     <= mqueue_info_i.preg;
    end else if (smu_sync_end_i) begin                   // invalid
      comb_valid_q       <= 1'b0;
    end else if (comb_valid_q && !comb_hold) begin       // next
      comb_line_offset_q <= comb_line_offset_q + 1'b1;
    end
  end

  // ------------------------------------------------------------------
  // VRF stage
  // ------------------------------------------------------------------
  assign vrf_line_offset = comb_line_offset_q;
  assign vrf_phy_reg     = comb_phy_reg_q;

  always_comb begin
    for (int unsigned b = 0; b < N_BANKS; b++)
      vrf_addr_calc[b] = vrf_mapping(vrf_phy_reg, b) + vrf_addr_t'(vrf_line_offset);
  end

  assign vrf_info_o.saddr = vrf_addr_calc;
  assign vrf_info_o.preg  = vrf_phy_reg;

  assign vrf_data = vrf_held_q ? vrf_data_q : vrf_data_i;

  always_ff @(posedge clk_i or negedge rsn_i) begin
    if (!rsn_i) begin
      vrf_valid_q <= 1'b0;
      vrf_held_q  <= 1'b0;
      vrf_data_q  <= '0;
    end else if (smu_sync_end_i || mqueue_sync_start_i) begin
      vrf_valid_q <= 1'b0;
      vrf_held_q  <= 1'b0;
    end else if (vrf_hold) begin                         // hold
      vrf_held_q  <= 1'b1;
      vrf_data_q  <= vrf_data;
    end else begin                                       // new / invalid
      vrf_valid_q <= granted;
      vrf_held_q  <= 1'b0;
    end
  end

  // ------------------------------------------------------------------
  // buffer stage
  // ------------------------------------------------------------------
  assign buffer_valid = vrf_valid_q;
  assign buffer_data  = vrf_data;
  assign sb_full  = (sb_depth_q + DEPTH_W'(N_BANKS)) > DEPTH_W'(STBF_DEPTH);
  assign sb_empty = (sb_depth_q == '0);
  assign sb_wr    = buffer_valid && !sb_full;
  assign sb_rd    = smu_valid_o && smu_ack_i;

  always_ff @(posedge clk_i or negedge rsn_i) begin
    if (!rsn_i) begin
      st_buffer         <= '0;
      sb_wr_pt_q        <= '0;
      sb_rd_pt_q        <= '0;
      sb_rd_pt_offset_q <= '0;
      sb_depth_q        <= '0;
    end else if (smu_sync_end_i || mqueue_sync_start_i) begin
      sb_wr_pt_q        <= '0;
      sb_rd_pt_q        <= '0;
      sb_rd_pt_offset_q <= '0;
      sb_depth_q        <= '0;
    end else begin
      if (sb_wr) begin
        st_buffer[sb_wr_pt_q] <= buffer_data;
        sb_wr_pt_q <= (int'(sb_wr_pt_q) == ST_BF_SIZE - 1) ? '0 : sb_wr_pt_q + 1'b1;
      end
      if (sb_rd) begin
        if (int'(sb_rd_pt_offset_q) == N_BANKS - 1) begin
          sb_rd_pt_offset_q <= '0;
          sb_rd_pt_q <= (int'(sb_rd_pt_q) == ST_BF_SIZE - 1) ? '0 : sb_rd_pt_q + 1'b1;
        end else begin
          sb_rd_pt_offset_q <= sb_rd_pt_offset_q + 1'b1;
        end
      end
      sb_depth_q <= sb_depth_q + (sb_wr ? DEPTH_W'(N_BANKS) : '0) - (sb_rd ? DEPTH_W'(1) : '0);
    end
  end

  // ------------------------------------------------------------------
  // SMU data
  // ------------------------------------------------------------------
  assign smu_data_o  = st_buffer[sb_rd_pt_q][sb_rd_pt_offset_q];
  assign smu_valid_o = !sb_empty;

  a_no_overflow: assert property (@(posedge clk_i) disable iff (!rsn_i)
                                  sb_depth_q <= DEPTH_W'(STBF_DEPTH));

endmodule
