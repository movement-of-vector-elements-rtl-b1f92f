// index_buffer: per-lane index buffer (IDXBF).
//
// Serialises one lane's slice of the index (offset) register of an indexed
// vector memory instruction towards the IMU. It has the same structure as
// the store buffer: the VRF is read one line at a time (one ELEN cell from
// each of the N_BANKS banks) and the IMU takes one ELEN word per handshake.
// Three pipeline stages:
//   comb   : line offset and physical register of the next line to read
//            (cases invalid / new / hold / next); holds while its VRF request
//            is not granted or while the VRF stage holds.
//   VRF    : per-bank addresses vrf_mapping(preg, b) + line offset; the VRF
//            answers a granted request with the shuffled line one cycle
//            later. Holds the line while the buffer has no free entry.
//   buffer : ST_BF_SIZE line-sized entries, written a line at a time, read
//            an ELEN word at a time. imu_data_o is the word at the read
//            pointer; imu_valid_o = !ib_empty.
// mqueue_sync_end_i (from the address queue, once all indexes of the
// instruction have been used) invalidates the comb and VRF stages and
// empties the buffer; a start in the same cycle wins.
//
// The source design gives the interface and states that the inside is the
// same as that of the other lane buffer; the two choices of the store buffer
// (request withheld while the VRF stage holds, "full" meaning no room for a
// whole line) are kept here.
module index_buffer
  import vlsu_pkg::*;
(
  input  logic          clk_i,
  input  logic          rsn_i,
  // address queue
  input  logic          mqueue_sync_start_i,
  input  mqueue2idxbf_t  mqueue_info_i,
  // vector register file
  output logic          vrf_req_o,
  input  logic          vrf_resp_i,
  output idxbf2vrf_t     vrf_info_o,
  input  st_buff_data_t vrf_data_i,
  // index management unit
  output logic          imu_valid_o,
  input  logic          imu_ack_i,
  output elen_t         imu_data_o,
  input  logic          mqueue_sync_end_i
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
  st_buff_data_t [ST_BF_SIZE-1:0] ib_buffer;
  logic [PT_W-1:0]      ib_wr_pt_q, ib_rd_pt_q;
  logic [BANK_ID_W-1:0] ib_rd_pt_offset_q;
  logic [DEPTH_W-1:0]   ib_depth_q;
  logic                 ib_full, ib_empty, ib_wr, ib_rd;
  logic                 buffer_valid;
  st_buff_data_t        buffer_data;

  // ------------------------------------------------------------------
  // comb stage
  // ------------------------------------------------------------------
  assign vrf_hold  = vrf_valid_q && ib_full;
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
    end else if (mqueue_sync_end_i) begin                   // invalid
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
    end else if (mqueue_sync_end_i || mqueue_sync_start_i) begin
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
  assign ib_full  = (ib_depth_q + DEPTH_W'(N_BANKS)) > DEPTH_W'(STBF_DEPTH);
  assign ib_empty = (ib_depth_q == '0);
  assign ib_wr    = buffer_valid && !ib_full;
  assign ib_rd    = imu_valid_o && imu_ack_i;

  always_ff @(posedge clk_i or negedge rsn_i) begin
    if (!rsn_i) begin
      ib_buffer         <= '0;
      ib_wr_pt_q        <= '0;
      ib_rd_pt_q        <= '0;
      ib_rd_pt_offset_q <= '0;
      ib_depth_q        <= '0;
    end else if (mqueue_sync_end_i || mqueue_sync_start_i) begin
      ib_wr_pt_q        <= '0;
      ib_rd_pt_q        <= '0;
      ib_rd_pt_offset_q <= '0;
      ib_depth_q        <= '0;
    end else begin
      if (ib_wr) begin
        ib_buffer[ib_wr_pt_q] <= buffer_data;
        ib_wr_pt_q <= (int'(ib_wr_pt_q) == ST_BF_SIZE - 1) ? '0 : ib_wr_pt_q + 1'b1;
      end
      if (ib_rd) begin
        if (int'(ib_rd_pt_offset_q) == N_BANKS - 1) begin
          ib_rd_pt_offset_q <= '0;
          ib_rd_pt_q <= (int'(ib_rd_pt_q) == ST_BF_SIZE - 1) ? '0 : ib_rd_pt_q + 1'b1;
        end else begin
          ib_rd_pt_offset_q <= ib_rd_pt_offset_q + 1'b1;
        end
      end
      ib_depth_q <= ib_depth_q + (ib_wr ? DEPTH_W'(N_BANKS) : '0) - (ib_rd ? DEPTH_W'(1) : '0);
    end
  end

  // ------------------------------------------------------------------
  // IMU data
  // ------------------------------------------------------------------
  assign imu_data_o  = ib_buffer[ib_rd_pt_q][ib_rd_pt_offset_q];
  assign imu_valid_o = !ib_empty;

  a_no_overflow: assert property (@(posedge clk_i) disable iff (!rsn_i)
                                  ib_depth_q <= DEPTH_W'(STBF_DEPTH));

endmodule
