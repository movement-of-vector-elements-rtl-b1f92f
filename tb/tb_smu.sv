// tb_smu: self-checking testbench of the Store Management Unit.
//
// The store-buffer side is modelled as a stream of 256-bit packages cut from
// a byte sequence V[i] (a fixed function of i and the instruction number),
// offered with random gaps. For every instruction the testbench picks a
// random SEW and row offset, then issues store requests of random kind
// (unit-stride, strided with positive, negative and >= 64-byte strides,
// indexed), element count and line offset. The expected line of each request
// is built directly, byte by byte: element e of the request (the next bytes
// of V after what earlier requests consumed, starting at the row offset)
// goes to byte e*|stride|/SEW*SEW + elem_offset, and for negative strides the
// element order of the line is reversed. Some instructions are killed part
// way. Checked: response data, tag/vmot_id/kill/line_mask copy, the
// end-of-store pulse, and that a response never comes before its bytes were
// delivered. Random backpressure on the response channel.
// A directed request then repeats the worked example of the design
// description (SEW 32, stride -12, first element 10, elem_offset 8): the
// elements 10..14 must end up in 32-bit slots 13, 10, 7, 4 and 1 of the line,
// positions written out by hand rather than computed by the reference model.
module tb_smu;
  import vlsu_pkg::*;

  logic clk = 0, rsn = 0;
  always #5 clk = ~clk;

  logic             mq_start;
  mqueue2smu_t      mq_info;
  logic             req_valid, req_ack;
  rqueue_smu_info_t req_info;
  logic             resp_valid, resp_ack;
  smu_rqueue_resp_t resp_info;
  logic             stbf_valid, stbf_ack;
  buffers_data_t    stbf_data;
  logic             sync_end;

  smu dut (
    .clk_i(clk), .rsn_i(rsn),
    .mqueue_sync_start_i(mq_start), .mqueue_info_i(mq_info),
    .rqueue_req_valid_i(req_valid), .rqueue_req_ack_o(req_ack), .rqueue_req_info_i(req_info),
    .rqueue_resp_valid_o(resp_valid), .rqueue_resp_ack_i(resp_ack), .rqueue_resp_info_o(resp_info),
    .stbf_valid_i(stbf_valid), .stbf_ack_o(stbf_ack), .stbf_data_i(stbf_data),
    .stbf_sync_end_o(sync_end)
  );

  int checks = 0, failures = 0;
  int instr_no = 0;

  function automatic logic [7:0] vbyte(int instr, int i);
    return 8'((i * 37 + instr * 11 + (i >> 5) * 3 + 5) & 255);
  endfunction

  // ---------------- store-buffer side ----------------
  int pkg_k = 0;
  int bytes_delivered = 0;   // stream bytes acknowledged so far
  always_comb
    for (int b = 0; b < PKG_BYTES; b++) stbf_data[8*b +: 8] = vbyte(instr_no, pkg_k * PKG_BYTES + b);

  always @(posedge clk) begin
    if (rsn) begin
      if (sync_end) begin
        pkg_k <= 0;
        bytes_delivered <= 0;
      end else if (stbf_valid && stbf_ack) begin
        pkg_k <= pkg_k + 1;
        bytes_delivered <= (pkg_k + 1) * PKG_BYTES;
      end
    end
  end
  always @(negedge clk) stbf_valid <= ($urandom_range(0, 3) != 0);

  // ---------------- expected responses ----------------
  typedef struct {
    smu_rqueue_resp_t exp;
    int               need;    // stream bytes that must have arrived
    logic             end_instr;
  } exp_t;
  exp_t expq[$];

  int n_resp = 0, n_neg = 0, n_big = 0, n_kill = 0, n_idx = 0, n_unit = 0, n_wait = 0, n_drop_instr = 0;

  logic pending = 1'b0;
  always @(negedge clk) resp_ack <= ($urandom_range(0, 2) != 0);

  always @(posedge clk) begin
    if (rsn && req_valid && req_ack) pending <= 1'b1;
    else if (rsn && resp_valid && resp_ack) pending <= 1'b0;
    if (rsn && pending && !resp_valid) n_wait++;
    if (rsn && resp_valid && resp_ack) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL: unexpected response");
      end else begin
        e = expq.pop_front();
        if (resp_info.kill != e.exp.kill || resp_info.tag != e.exp.tag ||
            resp_info.vmot_id != e.exp.vmot_id || resp_info.line_mask != e.exp.line_mask) begin
          failures++; $display("FAIL: response fields tag=%0d exp %0d", resp_info.tag, e.exp.tag);
        end
        if (!e.exp.kill) begin
          checks++;
          if (resp_info.data != e.exp.data) begin
            failures++;
            $display("FAIL: line tag=%0d\n got %h\n exp %h", e.exp.tag, resp_info.data, e.exp.data);
          end
          checks++;
          if ((pkg_k + 1) * PKG_BYTES < e.need) begin
            failures++; $display("FAIL: response before data delivered");
          end
        end
        checks++;
        if (sync_end !== e.end_instr) begin
          failures++; $display("FAIL: stbf_sync_end_o=%0b exp %0b", sync_end, e.end_instr);
        end
        n_resp++;
      end
    end else if (rsn && sync_end) begin
      checks++; failures++; $display("FAIL: stbf_sync_end_o without response");
    end
  end

  // ---------------- reference line builder ----------------
  function automatic l2_cache_line_t ref_line(int instr, int start, rqueue_smu_info_t r);
    logic [LINE_BYTES-1:0][7:0] line, rev;
    int w, n, sidx, astr;
    longint s;
    w = 1 << int'(r.vsew);
    n = LINE_BYTES / w;
    s = $signed(r.stride);
    astr = (s < 0) ? int'(-s > 64 ? 64 : -s) : int'(s > 64 ? 64 : s);
    sidx = (r.opmode == OP_STRIDED) ? astr / w : 1;
    if (sidx == 0) sidx = 1;
    line = '0;
    for (int e = 0; e < int'(r.elem_cnt); e++)
      for (int b = 0; b < w; b++) begin
        int pos;
        pos = e * sidx * w + b + int'(r.elem_offset);
        if (e * sidx < n && pos < LINE_BYTES) line[pos] = vbyte(instr, start + e * w + b);
      end
    if (r.opmode == OP_STRIDED && s < 0) begin
      rev = line;
      for (int q = 0; q < n; q++)
        for (int b = 0; b < w; b++) rev[(n - 1 - q) * w + b] = line[q * w + b];
      line = rev;
    end
    return l2_cache_line_t'(line);
  endfunction

  // ---------------- stimulus ----------------
  task automatic send_req(rqueue_smu_info_t r);
    @(negedge clk);
    req_valid = 1'b1;
    req_info  = r;
    do @(posedge clk); while (!req_ack);
    @(negedge clk);
    req_valid = 1'b0;
  endtask

  task automatic run_instr(int nreq, bit do_kill);
    int w, n, pos, row;
    vsew_e sew;
    sew = vsew_e'($urandom_range(0, 3));
    w = 1 << int'(sew);
    n = LINE_BYTES / w;
    row = $urandom_range(0, (VRF_LINE_BYTES / w) - 1) * w;
    if (row >= PKG_BYTES) n_drop_instr++;
    @(negedge clk);
    mq_start = 1'b1;
    mq_info.row = row_t'(row);
    @(negedge clk);
    mq_start = 1'b0;
    pos = row;
    for (int j = 0; j < nreq; j++) begin
      rqueue_smu_info_t r;
      exp_t e;
      int kind;
      r = '0;
      r.vsew = sew;
      kind = $urandom_range(0, 5);
      r.opmode = (kind == 0) ? OP_UNIT : (kind == 1) ? OP_INDEXED : OP_STRIDED;
      if (r.opmode == OP_STRIDED) begin
        int m;
        m = $urandom_range(1, 12);
        if (kind == 5) m = $urandom_range(n, n + 20);          // >= 64 bytes
        r.stride = xlen_t'(longint'(m * w));
        if (kind >= 4) r.stride = -r.stride;                    // negative
        if ($signed(r.stride) < 0) n_neg++;
        if (m * w >= LINE_BYTES) n_big++;
      end else begin
        r.stride = xlen_t'(w);
      end
      if (r.opmode == OP_UNIT) n_unit++;
      if (r.opmode == OP_INDEXED) n_idx++;
      r.elem_cnt    = elem_count_t'((r.opmode == OP_INDEXED) ? 1 : $urandom_range(1, n));
      r.elem_offset = elem_offset_t'($urandom_range(0, n - 1) * w);
      r.elem_id     = elem_id_t'((pos - row) / w);
      r.tag         = rqueue_id_t'(j);
      r.vmot_id     = vmot_id_t'(instr_no);
      r.line_mask   = {$urandom, $urandom};
      r.last        = (j == nreq - 1);
      r.kill        = do_kill && (j == nreq - 1);
      if (r.kill) n_kill++;
      e.exp.vmot_id   = r.vmot_id;
      e.exp.kill      = r.kill;
      e.exp.tag       = r.tag;
      e.exp.line_mask = r.line_mask;
      e.exp.data      = r.kill ? '0 : ref_line(instr_no, pos, r);
      e.need          = pos + int'(r.elem_cnt) * w;
      e.end_instr     = r.last || r.kill;
      expq.push_back(e);
      if (!r.kill) pos += int'(r.elem_cnt) * w;
      send_req(r);
    end
    // wait for the instruction to end
    do @(posedge clk); while (!(sync_end && resp_ack));
    @(negedge clk);
    instr_no++;
  endtask

  task automatic run_example();
    rqueue_smu_info_t r;
    exp_t e;
    int slot[5] = '{13, 10, 7, 4, 1};
    @(negedge clk);
    mq_start = 1'b1;
    mq_info.row = row_t'(10 * 4);       // first element 10 at SEW 32
    @(negedge clk);
    mq_start = 1'b0;
    r = '0;
    r.opmode      = OP_STRIDED;
    r.vsew        = vsew_e'(2);
    r.stride      = xlen_t'(-12);
    r.elem_id     = elem_id_t'(10);
    r.elem_cnt    = elem_count_t'(5);
    r.elem_offset = elem_offset_t'(8);
    r.tag         = rqueue_id_t'(5);
    r.vmot_id     = vmot_id_t'(instr_no);
    r.last        = 1'b1;
    e.exp.vmot_id   = r.vmot_id;
    e.exp.kill      = 1'b0;
    e.exp.tag       = r.tag;
    e.exp.line_mask = r.line_mask;
    e.exp.data      = '0;
    for (int k = 0; k < 5; k++)
      for (int b = 0; b < 4; b++) e.exp.data[8*(4*slot[k] + b) +: 8] = vbyte(instr_no, 4 * (10 + k) + b);
    e.need      = 4 * 15;
    e.end_instr = 1'b1;
    expq.push_back(e);
    send_req(r);
    do @(posedge clk); while (!(sync_end && resp_ack));
    @(negedge clk);
    instr_no++;
  endtask

  initial begin
    mq_start = 0; mq_info = '0; req_valid = 0; req_info = '0;
    repeat (3) @(posedge clk);
    rsn = 1;
    for (int i = 0; i < 60; i++) run_instr($urandom_range(1, 10), (i % 7) == 3);
    run_example();
    repeat (5) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL: %0d responses missing", expq.size()); end
    // every mechanism must have been exercised
    checks++; if (n_neg == 0)        begin failures++; $display("FAIL: no negative stride"); end
    checks++; if (n_big == 0)        begin failures++; $display("FAIL: no stride >= 64 B"); end
    checks++; if (n_kill == 0)       begin failures++; $display("FAIL: no kill"); end
    checks++; if (n_wait == 0)       begin failures++; $display("FAIL: never waited for data"); end
    checks++; if (n_drop_instr == 0) begin failures++; $display("FAIL: no package dropped"); end
    checks++; if (n_idx == 0 || n_unit == 0) begin failures++; $display("FAIL: missing op mode"); end
    $display("responses=%0d neg=%0d big=%0d kill=%0d wait_cycles=%0d drop_instr=%0d",
             n_resp, n_neg, n_big, n_kill, n_wait, n_drop_instr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
