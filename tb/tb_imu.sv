// tb_imu: self-checking testbench of the Index Management Unit.
//
// The index-buffer side is modelled as a stream of 256-bit packages cut from
// a byte sequence V[i], offered with random gaps. Each instruction picks a
// random SEW and row offset (a multiple of SEW below one 160-byte VRF line,
// so whole packages are dropped as well); the expected k-th index is the SEW
// bytes V[row + k*SEW ...], sign-extended to 64 bits, computed directly in
// the testbench. The AGU side takes indexes with random backpressure; after a
// random number of indexes the address queue's end pulse closes the
// instruction. Checked: every index, that no index is offered after the end,
// and that negative indexes of every SEW and package drops were seen.
// A directed part then feeds the 64-bit pattern 0FF00FF0F0F00FF0 at row 0
// with each SEW and compares the index with the sign-extension table of the
// design description (SEW8 FFFFFFFFFFFFFFF0, SEW16 0000000000000FF0,
// SEW32 FFFFFFFFF0F00FF0, SEW64 unchanged).
module tb_imu;
  import vlsu_pkg::*;

  logic clk = 0, rsn = 0;
  always #5 clk = ~clk;

  logic          mq_start, mq_end;
  mqueue2imu_t   mq_info;
  logic          agu_valid, agu_ack;
  elen_t         agu_index;
  logic          ib_valid, ib_ack;
  buffers_data_t ib_data;

  imu dut (
    .clk_i(clk), .rsn_i(rsn),
    .mqueue_sync_start_i(mq_start), .mqueue_info_i(mq_info), .mqueue_sync_end_i(mq_end),
    .agu_index_valid_o(agu_valid), .agu_index_ack_i(agu_ack), .agu_index_o(agu_index),
    .idxbf_valid_i(ib_valid), .idxbf_ack_o(ib_ack), .idxbf_data_i(ib_data)
  );

  int checks = 0, failures = 0;
  int instr_no = 0;

  function automatic logic [7:0] vbyte(int instr, int i);
    return 8'((i * 29 + instr * 13 + (i >> 3) * 101 + 7) & 255);
  endfunction

  int   pkg_k = 0;
  logic fig_mode = 0;
  always_comb begin
    for (int b = 0; b < PKG_BYTES; b++) ib_data[8*b +: 8] = vbyte(instr_no, pkg_k * PKG_BYTES + b);
    if (fig_mode) ib_data = buffers_data_t'(64'h0FF0_0FF0_F0F0_0FF0);
  end
  always @(posedge clk)
    if (rsn) begin
      if (mq_end) pkg_k <= 0;
      else if (ib_valid && ib_ack) pkg_k <= pkg_k + 1;
    end
  always @(negedge clk) ib_valid <= ($urandom_range(0, 3) != 0);
  always @(negedge clk) agu_ack  <= ($urandom_range(0, 2) != 0);

  int   cur_row, cur_w, idx_k;
  logic active = 0;
  int   n_neg[4] = '{0, 0, 0, 0};
  int   n_drop = 0;

  function automatic elen_t exp_index(int instr, int start, int w);
    elen_t v;
    v = '0;
    for (int b = 0; b < w; b++) v[8*b +: 8] = vbyte(instr, start + b);
    if (v[8*w-1] && w < 8) v = v | (~elen_t'(0) << (8*w));
    return v;
  endfunction

  elen_t fig_got;
  logic  fig_seen = 0;
  always @(posedge clk) begin
    if (rsn && fig_mode && agu_valid && agu_ack && !fig_seen) begin
      fig_got  = agu_index;
      fig_seen = 1;
    end
    if (rsn && agu_valid && !active && !fig_mode) begin
      checks++; failures++; $display("FAIL: index offered with no instruction");
    end
    if (rsn && active && agu_valid && agu_ack) begin
      elen_t e;
      e = exp_index(instr_no, cur_row + idx_k * cur_w, cur_w);
      checks++;
      if (agu_index !== e) begin
        failures++; $display("FAIL: index %0d got %h exp %h", idx_k, agu_index, e);
      end
      if (e[63]) n_neg[$clog2(cur_w)]++;
      idx_k = idx_k + 1;
    end
  end

  task automatic run_instr(int nidx);
    vsew_e sew;
    sew = vsew_e'($urandom_range(0, 3));
    cur_w = 1 << int'(sew);
    cur_row = $urandom_range(0, VRF_LINE_BYTES / cur_w - 1) * cur_w;
    if (cur_row >= PKG_BYTES) n_drop++;
    idx_k = 0;
    @(negedge clk);
    mq_start = 1;
    mq_info.row = row_t'(cur_row);
    mq_info.vsew = sew;
    active = 1;
    @(negedge clk);
    mq_start = 0;
    while (idx_k < nidx) @(negedge clk);
    mq_end = 1;
    @(negedge clk);
    mq_end = 0;
    active = 0;
    instr_no++;
    repeat ($urandom_range(0, 2)) @(negedge clk);
  endtask

  initial begin
    mq_start = 0; mq_end = 0; mq_info = '0;
    repeat (3) @(posedge clk);
    rsn = 1;
    for (int i = 0; i < 120; i++) run_instr($urandom_range(1, 40));
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (n_neg[s] == 0) begin failures++; $display("FAIL: no negative index at SEW%0d", 8 << s); end
    end
    checks++; if (n_drop == 0) begin failures++; $display("FAIL: no package dropped"); end
    // directed: sign-extension table
    fig_mode = 1;
    for (int s = 0; s < 4; s++) begin
      elen_t fig_exp[4] = '{64'hFFFF_FFFF_FFFF_FFF0, 64'h0000_0000_0000_0FF0,
                            64'hFFFF_FFFF_F0F0_0FF0, 64'h0FF0_0FF0_F0F0_0FF0};
      int wait_cyc;
      @(negedge clk);
      mq_start = 1; mq_info.row = '0; mq_info.vsew = vsew_e'(s);
      @(negedge clk);
      mq_start = 0;
      wait_cyc = 0;
      while (!fig_seen && wait_cyc < 100) begin @(negedge clk); wait_cyc++; end
      checks++;
      if (!fig_seen || fig_got !== fig_exp[s]) begin
        failures++; $display("FAIL: table SEW%0d got %h exp %h", 8 << s, fig_got, fig_exp[s]);
      end
      mq_end = 1;
      @(negedge clk);
      mq_end = 0;
      fig_seen = 0;
    end
    $display("neg=%0d/%0d/%0d/%0d drops=%0d", n_neg[0], n_neg[1], n_neg[2], n_neg[3], n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
