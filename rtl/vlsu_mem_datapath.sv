// vlsu_mem_datapath: element-movement datapath of the memory path of a
// decoupled vector processing unit.
//
// Two paths move vector elements from the lanes' register file slices to
// the unit that needs them in memory order:
//   store path : in every lane a store_buffer reads the source register line
//                by line from its vrf_slice and hands it out an ELEN word at a
//                time; the smu joins one word of every lane into a 256-bit
//                package, buffers it and builds, request by request, the L2
//                cache line that the request queue writes to memory.
//   index path : in every lane an index_buffer reads the index register the
//                same way; the imu joins the lanes' words and hands the AGU one
//                sign-extended index per handshake.
// The two buffers of a lane compete for the lane's VRF banks through the
// slice's arbiter (index buffer first). A package is taken from the lanes
// only when all of them have a word (valid = AND over lanes) and the one
// acknowledge goes to every lane, so the lanes stay in step.
//
// The address queue, request queue and AGU are outside this datapath: their
// signals are the ports. The VRF write port (lane, bank, row, data) fills the
// register file; in the full VPU that is the arithmetic and load paths' job.
// The store buffers are reset by the SMU's end-of-store signal (also brought
// out), the index buffers and the IMU by the address queue's
// idx_mqueue_sync_end_i.
// Latency: a store's first line leaves the VRF two cycles after its start,
// its first package reaches the SMU one cycle later, and a request is
// answered from the cycle after the last of its bytes is buffered.
module vlsu_mem_datapath
  import vlsu_pkg::*;
(
  input  logic                       clk_i,
  input  logic                       rsn_i,
  // register file fill port
  input  logic                       vrf_we_i,
  input  logic [$clog2(N_LANES)-1:0] vrf_wlane_i,
  input  logic [BANK_ID_W-1:0]       vrf_wbank_i,
  input  vrf_addr_t                  vrf_waddr_i,
  input  elen_t                      vrf_wdata_i,
  // address queue: store instruction
  input  logic                       st_mqueue_sync_start_i,
  input  mqueue2smu_t                st_mqueue_smu_info_i,
  input  mqueue2stbf_t               st_mqueue_stbf_info_i,
  // request queue
  input  logic                       rqueue_req_valid_i,
  output logic                       rqueue_req_ack_o,
  input  rqueue_smu_info_t           rqueue_req_info_i,
  output logic                       rqueue_resp_valid_o,
  input  logic                       rqueue_resp_ack_i,
  output smu_rqueue_resp_t           rqueue_resp_info_o,
  output logic                       stbf_sync_end_o,
  // address queue: indexed instruction
  input  logic                       idx_mqueue_sync_start_i,
  input  mqueue2imu_t                idx_mqueue_imu_info_i,
  input  mqueue2idxbf_t              idx_mqueue_idxbf_info_i,
  input  logic                       idx_mqueue_sync_end_i,
  // address generation unit
  output logic                       agu_index_valid_o,
  input  logic                       agu_index_ack_i,
  output elen_t                      agu_index_o
);

  // lane-side signals
  logic          [N_LANES-1:0] stbf_vrf_req, stbf_vrf_resp, stbf_valid;
  logic          [N_LANES-1:0] idxbf_vrf_req, idxbf_vrf_resp, idxbf_valid;
  stbf2vrf_t     [N_LANES-1:0] stbf_vrf_info;
  idxbf2vrf_t    [N_LANES-1:0] idxbf_vrf_info;
  st_buff_data_t [N_LANES-1:0] vrf_rdata;
  elen_t         [N_LANES-1:0] stbf_word, idxbf_word;

  logic          smu_stbf_ack, imu_idxbf_ack, smu_sync_end;
  buffers_data_t stbf_pkg, idxbf_pkg;

  for (genvar l = 0; l < N_LANES; l++) begin : g_lane
    logic      [1:0] vrf_req, vrf_resp;
    stbf2vrf_t [1:0] vrf_info;

    assign vrf_req  = {stbf_vrf_req[l], idxbf_vrf_req[l]};
    assign vrf_info = {stbf_vrf_info[l], idxbf_vrf_info[l]};
    assign idxbf_vrf_resp[l] = vrf_resp[0];
    assign stbf_vrf_resp[l]  = vrf_resp[1];

    vrf_slice u_vrf (
      .clk_i   (clk_i),
      .rsn_i   (rsn_i),
      .we_i    (vrf_we_i && (int'(vrf_wlane_i) == l)),
      .wbank_i (vrf_wbank_i),
      .waddr_i (vrf_waddr_i),
      .wdata_i (vrf_wdata_i),
      .req_i   (vrf_req),
      .resp_o  (vrf_resp),
      .info_i  (vrf_info),
      .rdata_o (vrf_rdata[l])
    );

    store_buffer u_stbf (
      .clk_i               (clk_i),
      .rsn_i               (rsn_i),
      .mqueue_sync_start_i (st_mqueue_sync_start_i),
      .mqueue_info_i       (st_mqueue_stbf_info_i),
      .vrf_req_o           (stbf_vrf_req[l]),
      .vrf_resp_i          (stbf_vrf_resp[l]),
      .vrf_info_o          (stbf_vrf_info[l]),
      .vrf_data_i          (vrf_rdata[l]),
      .smu_valid_o         (stbf_valid[l]),
      .smu_ack_i           (smu_stbf_ack),
      .smu_data_o          (stbf_word[l]),
      .smu_sync_end_i      (smu_sync_end)
    );

    index_buffer u_idxbf (
      .clk_i               (clk_i),
      .rsn_i               (rsn_i),
      .mqueue_sync_start_i (idx_mqueue_sync_start_i),
      .mqueue_info_i       (idx_mqueue_idxbf_info_i),
      .vrf_req_o           (idxbf_vrf_req[l]),
      .vrf_resp_i          (idxbf_vrf_resp[l]),
      .vrf_info_o          (idxbf_vrf_info[l]),
      .vrf_data_i          (vrf_rdata[l]),
      .imu_valid_o         (idxbf_valid[l]),
      .imu_ack_i           (imu_idxbf_ack),
      .imu_data_o          (idxbf_word[l]),
      .mqueue_sync_end_i   (idx_mqueue_sync_end_i)
    );
  end

  // lane l's word is bytes [l*ELEN_BYTES +: ELEN_BYTES] of a package
  assign stbf_pkg  = buffers_data_t'(stbf_word);
  assign idxbf_pkg = buffers_data_t'(idxbf_word);

  smu u_smu (
    .clk_i               (clk_i),
    .rsn_i               (rsn_i),
    .mqueue_sync_start_i (st_mqueue_sync_start_i),
    .mqueue_info_i       (st_mqueue_smu_info_i),
    .rqueue_req_valid_i  (rqueue_req_valid_i),
    .rqueue_req_ack_o    (rqueue_req_ack_o),
    .rqueue_req_info_i   (rqueue_req_info_i),
    .rqueue_resp_valid_o (rqueue_resp_valid_o),
    .rqueue_resp_ack_i   (rqueue_resp_ack_i),
    .rqueue_resp_info_o  (rqueue_resp_info_o),
    .stbf_valid_i        (&stbf_valid),
    .stbf_ack_o          (smu_stbf_ack),
    .stbf_data_i         (stbf_pkg),
    .stbf_sync_end_o     (smu_sync_end)
  );

  imu u_imu (
    .clk_i               (clk_i),
    .rsn_i               (rsn_i),
    .mqueue_sync_start_i (idx_mqueue_sync_start_i),
    .mqueue_info_i       (idx_mqueue_imu_info_i),
    .mqueue_sync_end_i   (idx_mqueue_sync_end_i),
    .agu_index_valid_o   (agu_index_valid_o),
    .agu_index_ack_i     (agu_index_ack_i),
    .agu_index_o         (agu_index_o),
    .idxbf_valid_i       (&idxbf_valid),
    .idxbf_ack_o         (imu_idxbf_ack),
    .idxbf_data_i        (idxbf_pkg)
  );

  assign stbf_sync_end_o = smu_sync_end;

endmodule
