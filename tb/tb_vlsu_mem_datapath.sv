// tb_vlsu_mem_datapath: end-to-end testbench of the store and index paths,
// at the design's default size (4 lanes, 5 banks, 40 registers of 4096 bits).
//
// The register file of all lanes is filled through the write port with a
// known pattern: byte v of physical register p is RB(p, v), stored the way
// the lanes hold it (ELEN word q = v/8 in lane q % N_LANES, lane cell
// q / N_LANES, bank/row from the lane's linear cell number).
// Two threads then run at the same time, so that the lane buffers compete for
// the VRF banks:
//   store thread : vector stores from a random register, SEW and vstart;
//                  the address queue side gives the first VRF line and the
//                  row offset, the request queue side issues random
//                  unit-stride / strided (positive, negative, >= 64 B) /
//                  indexed requests over the active elements, some stores
//                  are killed part way. Each response line is compared with a
//                  line built byte by byte from RB.
//   index thread : indexed instructions from a random register, SEW and
//                  vstart; every index the AGU receives is compared with the
//                  sign-extended RB bytes; the address queue ends the
//                  instruction after a random number of indexes.
// Every mechanism of the datapath is counted and must occur at least once:
// VRF arbitration loss of a store buffer, store-buffer full hold, package
// drop before the row offset (SMU and IMU), partial package write, request
// waiting for data, negative-stride inversion, stride saturation, kill,
// end-of-store reset, negative index.
module tb_vlsu_mem_datapath;
  import vlsu_pkg::*;

  logic clk = 0, rsn = 0;
  always #5 clk = ~clk;

  logic                       vrf_we;
  logic [$clog2(N_LANES)-1:0] vrf_wlane;
  logic [BANK_ID_W-1:0]       vrf_wbank;
  vrf_addr_t                  vrf_waddr;
  elen_t                      vrf_wdata;
  logic                       st_start;
  mqueue2smu_t                st_smu_info;
  mqueue2stbf_t               st_stbf_info;
  logic                       req_valid, req_ack, resp_valid, resp_ack, st_end;
  rqueue_smu_info_t           req_info;
  smu_rqueue_resp_t           resp_info;
  logic                       ix_start, ix_end;
  mqueue2imu_t                ix_imu_info;
  mqueue2idxbf_t              ix_idxbf_info;
  logic                       agu_valid, agu_ack;
  elen_t                      agu_index;

  vlsu_mem_datapath dut (
    .clk_i(clk), .rsn_i(rsn),
    .vrf_we_i(vrf_we), .vrf_wlane_i(vrf_wlane), .vrf_wbank_i(vrf_wbank),
    .vrf_waddr_i(vrf_waddr), .vrf_wdata_i(vrf_wdata),
    .st_mqueue_sync_start_i(st_start), .st_mqueue_smu_info_i(st_smu_info),
    .st_mqueue_stbf_info_i(st_stbf_info),
    .rqueue_req_valid_i(req_valid), .rqueue_req_ack_o(req_ack), .rqueue_req_info_i(req_info),
    .rqueue_resp_valid_o(resp_valid), .rqueue_resp_ack_i(resp_ack), .rqueue_resp_info_o(resp_info),
    .stbf_sync_end_o(st_end),
    .idx_mqueue_sync_start_i(ix_start), .idx_mqueue_imu_info_i(ix_imu_info),
    .idx_mqueue_idxbf_info_i(ix_idxbf_info), .idx_mqueue_sync_end_i(ix_end),
    .agu_index_valid_o(agu_valid), .agu_index_ack_i(agu_ack), .agu_index_o(agu_index)
  );

  localparam int REG_BYTES = VLEN / 8;

  int checks = 0, failures = 0;

  function automatic logic [7:0] rb(int p, int v);
    return 8'((p * 53 + v * 7 + (v >> 3) * 13 + 1) & 255);
  endfunction

  // ---------------- mechanism counters ----------------
  int c_vrf_loss = 0, c_stbf_hold = 0, c_smu_drop = 0, c_imu_drop = 0, c_partial = 0;
  int c_wait = 0, c_neg = 0, c_sat = 0, c_kill = 0, c_end = 0, c_negidx = 0;
  logic pending = 0;

  always @(posedge clk) if (rsn) begin
    for (int l = 0; l < N_LANES; l++) begin
      if (dut.stbf_vrf_req[l] && !dut.stbf_vrf_resp[l]) c_vrf_loss++;
    end
    if (dut.g_lane[0].u_stbf.vrf_hold) c_stbf_hold++;
    if (dut.u_smu.u_buffer.drop) c_smu_drop++;
    if (dut.u_imu.u_buffer.drop) c_imu_drop++;
    if (dut.u_smu.u_buffer.sb_wr && !dut.u_smu.stbf_ack_o) c_partial++;
    if (req_valid && req_ack) pending <= 1;
    else if (resp_valid && resp_ack) pending <= 0;
    if (pending && !resp_valid) c_wait++;
    if (st_end) c_end++;
  end

  // ---------------- register file fill ----------------
  task automatic fill_vrf();
    for (int p = 0; p < N_PREGS; p++)
      for (int q = 0; q < REG_BYTES / ELEN_BYTES; q++) begin
        int lane, lcell, a;
        elen_t w;
        lane = q % N_LANES;
        lcell = q / N_LANES;
        a = p * CELLS_PER_REG + lcell;
        for (int b = 0; b < ELEN_BYTES; b++) w[8*b +: 8] = rb(p, q * ELEN_BYTES + b);
        @(negedge clk);
        vrf_we = 1; vrf_wlane = $clog2(N_LANES)'(lane); vrf_wbank = BANK_ID_W'(a % N_BANKS);
        vrf_waddr = vrf_addr_t'(a / N_BANKS); vrf_wdata = w;
      end
    @(negedge clk);
    vrf_we = 0;
  endtask

  // ---------------- store thread ----------------
  typedef struct { smu_rqueue_resp_t exp; logic end_instr; } exp_t;
  exp_t expq[$];

  always @(negedge clk) resp_ack <= ($urandom_range(0, 3) != 0);

  always @(posedge clk) if (rsn && resp_valid && resp_ack) begin
    exp_t e;
    checks++;
    if (expq.size() == 0) begin
      failures++; $display("FAIL: unexpected store response");
    end else begin
      e = expq.pop_front();
      if (resp_info.tag != e.exp.tag || resp_info.kill != e.exp.kill ||
          resp_info.vmot_id != e.exp.vmot_id || resp_info.line_mask != e.exp.line_mask) begin
        failures++; $display("FAIL: store response fields");
      end
      if (!e.exp.kill) begin
        checks++;
        if (resp_info.data !== e.exp.data) begin
          failures++;
          $display("FAIL: store line tag %0d\n got %h\n exp %h", e.exp.tag, resp_info.data, e.exp.data);
        end
      end
      checks++;
      if (st_end !== e.end_instr) begin failures++; $display("FAIL: end-of-store pulse"); end
    end
  end

  function automatic l2_cache_line_t ref_line(int p, int start, rqueue_smu_info_t r);
    logic [LINE_BYTES-1:0][7:0] line, rev;
    int w, n, sidx, astr;
    longint s;
    w = 1 << int'(r.vsew);
    n = LINE_BYTES / w;
    s = $signed(r.stride);
    astr = (s < 0) ? int'(-s > 64 ? 64 : -s) : int'(s > 64 ? 64 : s);
    sidx = (r.opmode == OP_STRIDED) ? astr / w : 1;
    line = '0;
    for (int e = 0; e < int'(r.elem_cnt); e++)
      for (int b = 0; b < w; b++) begin
        int pos;
        pos = e * sidx * w + b + int'(r.elem_offset);
        if (e * sidx < n && pos < LINE_BYTES) line[pos] = rb(p, start + e * w + b);
      end
    if (r.opmode == OP_STRIDED && s < 0) begin
      rev = line;
      for (int q = 0; q < n; q++)
        for (int b = 0; b < w; b++) rev[(n - 1 - q) * w + b] = line[q * w + b];
      line = rev;
    end
    return l2_cache_line_t'(line);
  endfunction

  task automatic store_instr(int id, bit do_kill);
    int p, w, n, s_byte, pos, remaining, nreq;
    vsew_e sew;
    p = $urandom_range(0, N_PREGS - 1);
    sew = vsew_e'($urandom_range(0, 3));
    w = 1 << int'(sew);
    n = LINE_BYTES / w;
    s_byte = $urandom_range(0, (REG_BYTES / w) - 1) * w;     // vstart in bytes
    remaining = (REG_BYTES - s_byte) / w;                     // active elements
    @(negedge clk);
    st_start = 1;
    st_smu_info.row = row_t'(s_byte % VRF_LINE_BYTES);
    st_stbf_info.line_offset = row_t'(s_byte / VRF_LINE_BYTES);
    st_stbf_info.preg = preg_t'(p);
    @(negedge clk);
    st_start = 0;
    pos = s_byte;
    nreq = 0;
    while (remaining > 0) begin
      rqueue_smu_info_t r;
      exp_t e;
      int kind, cnt;
      r = '0;
      r.vsew = sew;
      kind = $urandom_range(0, 5);
      r.opmode = (kind == 0) ? OP_UNIT : (kind == 1) ? OP_INDEXED : OP_STRIDED;
      if (r.opmode == OP_STRIDED) begin
        int m;
        m = (kind == 5) ? $urandom_range(n, n + 9) : $urandom_range(1, 6);
        r.stride = xlen_t'(longint'(m * w));
        if (kind >= 4) begin r.stride = -r.stride; c_neg++; end
        if (m * w >= LINE_BYTES) c_sat++;
      end else r.stride = xlen_t'(w);
      cnt = (r.opmode == OP_INDEXED) ? 1 : $urandom_range(1, n);
      if (cnt > remaining) cnt = remaining;
      r.elem_cnt    = elem_count_t'(cnt);
      r.elem_offset = elem_offset_t'($urandom_range(0, n - 1) * w);
      r.elem_id     = elem_id_t'(pos / w);
      r.tag         = rqueue_id_t'(nreq);
      r.vmot_id     = vmot_id_t'(id);
      r.line_mask   = {$urandom, $urandom};
      r.kill        = do_kill && nreq == 2;
      r.last        = r.kill || (cnt == remaining);
      e.exp.vmot_id = r.vmot_id; e.exp.kill = r.kill; e.exp.tag = r.tag; e.exp.line_mask = r.line_mask;
      e.exp.data    = r.kill ? '0 : ref_line(p, pos, r);
      e.end_instr   = r.last;
      expq.push_back(e);
      @(negedge clk);
      req_valid = 1; req_info = r;
      do @(posedge clk); while (!req_ack);
      @(negedge clk);
      req_valid = 0;
      nreq++;
      if (r.kill) begin c_kill++; break; end
      pos += cnt * w;
      remaining -= cnt;
    end
    do @(posedge clk); while (!(st_end && resp_ack));
    @(negedge clk);
  endtask

  // ---------------- index thread ----------------
  int   ix_p, ix_w, ix_start_byte, ix_k, ix_n;
  logic ix_active = 0;
  always @(negedge clk) agu_ack <= ($urandom_range(0, 2) != 0);

  always @(posedge clk) if (rsn && ix_active && ix_k < ix_n && agu_valid && agu_ack) begin
    elen_t e;
    e = '0;
    for (int b = 0; b < ix_w; b++) e[8*b +: 8] = rb(ix_p, ix_start_byte + ix_k * ix_w + b);
    if (e[8*ix_w-1] && ix_w < 8) e = e | (~elen_t'(0) << (8*ix_w));
    if (e[63]) c_negidx++;
    checks++;
    if (agu_index !== e) begin
      failures++; $display("FAIL: index %0d of preg %0d got %h exp %h (w=%0d start=%0d t=%0t)", ix_k, ix_p, agu_index, e, ix_w, ix_start_byte, $time);
    end
    ix_k = ix_k + 1;
  end

  task automatic index_instr();
    int nidx;
    vsew_e sew;
    ix_p = $urandom_range(0, N_PREGS - 1);
    sew = vsew_e'($urandom_range(0, 3));
    ix_w = 1 << int'(sew);
    ix_start_byte = $urandom_range(0, (REG_BYTES / ix_w) - 1) * ix_w;
    nidx = $urandom_range(1, (REG_BYTES - ix_start_byte) / ix_w);
    if (nidx > 48) nidx = 48;
    ix_k = 0;
    ix_n = nidx;
    @(negedge clk);
    ix_start = 1;
    ix_imu_info.row  = row_t'(ix_start_byte % VRF_LINE_BYTES);
    ix_imu_info.vsew = sew;
    ix_idxbf_info.line_offset = row_t'(ix_start_byte / VRF_LINE_BYTES);
    ix_idxbf_info.preg = preg_t'(ix_p);
    ix_active = 1;
    @(negedge clk);
    ix_start = 0;
    while (ix_k < nidx) @(negedge clk);
    ix_end = 1;
    @(negedge clk);
    ix_end = 0;
    ix_active = 0;
  endtask

  initial begin
    vrf_we = 0; vrf_wlane = '0; vrf_wbank = '0; vrf_waddr = '0; vrf_wdata = '0;
    st_start = 0; st_smu_info = '0; st_stbf_info = '0; req_valid = 0; req_info = '0;
    ix_start = 0; ix_end = 0; ix_imu_info = '0; ix_idxbf_info = '0;
    repeat (3) @(posedge clk);
    rsn = 1;
    fill_vrf();
    fork
      for (int i = 0; i < 40; i++) store_instr(i, (i % 6) == 4);
      for (int i = 0; i < 60; i++) index_instr();
    join
    repeat (5) @(posedge clk);
    checks++; if (expq.size() != 0) begin failures++; $display("FAIL: store responses missing"); end
    checks++; if (c_vrf_loss  == 0) begin failures++; $display("FAIL: no VRF arbitration loss"); end
    checks++; if (c_stbf_hold == 0) begin failures++; $display("FAIL: no store-buffer hold"); end
    checks++; if (c_smu_drop  == 0) begin failures++; $display("FAIL: no SMU package drop"); end
    checks++; if (c_imu_drop  == 0) begin failures++; $display("FAIL: no IMU package drop"); end
    checks++; if (c_partial   == 0) begin failures++; $display("FAIL: no partial package write"); end
    checks++; if (c_wait      == 0) begin failures++; $display("FAIL: no request waited for data"); end
    checks++; if (c_neg       == 0) begin failures++; $display("FAIL: no negative stride"); end
    checks++; if (c_sat       == 0) begin failures++; $display("FAIL: no saturated stride"); end
    checks++; if (c_kill      == 0) begin failures++; $display("FAIL: no kill"); end
    checks++; if (c_end       == 0) begin failures++; $display("FAIL: no end-of-store reset"); end
    checks++; if (c_negidx    == 0) begin failures++; $display("FAIL: no negative index"); end
    $display("vrf_loss=%0d stbf_hold=%0d smu_drop=%0d imu_drop=%0d partial=%0d wait=%0d neg=%0d sat=%0d kill=%0d end=%0d negidx=%0d",
             c_vrf_loss, c_stbf_hold, c_smu_drop, c_imu_drop, c_partial, c_wait, c_neg, c_sat,
             c_kill, c_end, c_negidx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
