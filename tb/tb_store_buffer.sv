// tb_store_buffer: self-checking testbench of the per-lane store buffer.
//
// The VRF is modelled in the testbench: bank b, row r holds
// cell_val(b, r); a request is granted at random, and the line arrives one
// cycle after the grant, shuffled into cell order (cell j from bank
// (preg*CELLS_PER_REG + j) % N_BANKS), using the per-bank rows the buffer
// asked for. The expected word stream of an instruction with register p and
// first line L is cell k = p*CELLS_PER_REG + L*N_BANKS + k of the lane's
// linear cell space, i.e. cell_val(k % N_BANKS, k / N_BANKS), computed
// without the buffer's address arithmetic. The SMU side takes words with
// random backpressure, ends each instruction after a random number of words
// with the end-of-store pulse, and starts the next one.
// Checked: every word, that the first word is offered two cycles after the
// first grant, and that VRF denial and buffer-full stalls both happened.
module tb_store_buffer;
  import vlsu_pkg::*;

  logic clk = 0, rsn = 0;
  always #5 clk = ~clk;

  logic          mq_start;
  mqueue2stbf_t  mq_info;
  logic          vrf_req, vrf_resp;
  stbf2vrf_t     vrf_info;
  st_buff_data_t vrf_data;
  logic          out_valid, out_ack, sync_end;
  elen_t         out_data;

  store_buffer dut (
    .clk_i(clk), .rsn_i(rsn),
    .mqueue_sync_start_i(mq_start), .mqueue_info_i(mq_info),
    .vrf_req_o(vrf_req), .vrf_resp_i(vrf_resp), .vrf_info_o(vrf_info), .vrf_data_i(vrf_data),
    .smu_valid_o(out_valid), .smu_ack_i(out_ack), .smu_data_o(out_data),
    .smu_sync_end_i(sync_end)
  );

  int checks = 0, failures = 0;

  function automatic elen_t cell_val(int bank, int row);
    return {16'hCE11, 16'(bank), 16'(row), 16'(row * 7 + bank * 3)};
  endfunction

  // ---------------- VRF model ----------------
  int grant_cnt = 0, deny_cnt = 0, hold_cnt = 0;
  always @(negedge clk) vrf_resp <= ($urandom_range(0, 3) != 0);
  always @(posedge clk) begin
    if (rsn && vrf_req && vrf_resp) begin
      int fb;
      fb = (int'(vrf_info.preg) * CELLS_PER_REG) % N_BANKS;
      for (int j = 0; j < N_BANKS; j++) begin
        int b;
        b = (fb + j) % N_BANKS;
        vrf_data[j] <= cell_val(b, int'(vrf_info.saddr[b]));
      end
      grant_cnt <= grant_cnt + 1;
    end else begin
      vrf_data <= {N_BANKS{64'hDEAD_BEEF_DEAD_BEEF}};
    end
    if (rsn && vrf_req && !vrf_resp) deny_cnt <= deny_cnt + 1;
  end

  // ---------------- SMU side ----------------
  int   base_cell, word_k, stop_at;
  logic active = 0;
  int   t_first_grant, t_first_word, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) out_ack <= ($urandom_range(0, 2) != 0);

  always @(posedge clk) begin
    if (rsn && active && t_first_grant >= 0 && !vrf_req) hold_cnt <= hold_cnt + 1;
    if (rsn && active && vrf_req && vrf_resp && t_first_grant < 0) t_first_grant = cyc;
    if (rsn && active && out_valid && t_first_word < 0) t_first_word = cyc;
    if (rsn && active && out_valid && out_ack) begin
      int c;
      elen_t exp;
      c = base_cell + word_k;
      exp = cell_val(c % N_BANKS, c / N_BANKS);
      checks++;
      if (out_data !== exp) begin
        failures++;
        $display("FAIL: word %0d got %h exp %h", word_k, out_data, exp);
      end
      word_k = word_k + 1;
    end
  end

  task automatic run_instr(int preg, int line, int nwords);
    @(negedge clk);
    mq_start = 1;
    mq_info.preg = preg_t'(preg);
    mq_info.line_offset = row_t'(line);
    base_cell = preg * CELLS_PER_REG + line * N_BANKS;
    word_k = 0;
    t_first_grant = -1;
    t_first_word = -1;
    active = 1;
    @(negedge clk);
    mq_start = 0;
    while (word_k < nwords) @(negedge clk);
    // end of store: reset pulse
    sync_end = 1;
    active = 0;
    @(negedge clk);
    sync_end = 0;
    checks++;
    if (t_first_word - t_first_grant != 2) begin
      failures++;
      $display("FAIL: first word %0d cycles after first grant", t_first_word - t_first_grant);
    end
    repeat ($urandom_range(0, 3)) @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL: data left after end of store"); end
  endtask

  initial begin
    mq_start = 0; mq_info = '0; sync_end = 0;
    repeat (3) @(posedge clk);
    rsn = 1;
    for (int i = 0; i < 80; i++)
      run_instr($urandom_range(0, N_PREGS - 2), $urandom_range(0, 3), $urandom_range(1, 3 * N_BANKS + 4));
    checks++; if (deny_cnt == 0) begin failures++; $display("FAIL: no VRF denial"); end
    checks++; if (hold_cnt == 0) begin failures++; $display("FAIL: no buffer-full hold"); end
    $display("grants=%0d denials=%0d hold_cycles=%0d", grant_cnt, deny_cnt, hold_cnt);
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
