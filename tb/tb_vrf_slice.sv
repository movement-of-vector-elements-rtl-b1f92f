// tb_vrf_slice: self-checking testbench of one lane's VRF slice.
//
// Fills every bank through the write port with random data kept in a
// shadow copy, then issues random line reads on both ports. The per-bank
// rows of a read of line L of register p are derived in the testbench from
// the cell numbering alone: cell j of the line is linear cell
// a = p*CELLS_PER_REG + L*N_BANKS + j, i.e. bank a % N_BANKS, row
// a / N_BANKS. Checked: exactly the expected port is granted (port 0 wins
// when both ask), and one cycle after a grant the line arrives in cell
// order, equal to the shadow copy.
module tb_vrf_slice;
  import vlsu_pkg::*;

  logic clk = 0, rsn = 0;
  always #5 clk = ~clk;

  logic                 we;
  logic [BANK_ID_W-1:0] wbank;
  vrf_addr_t            waddr;
  elen_t                wdata;
  logic      [1:0]      req, resp;
  stbf2vrf_t [1:0]      info;
  st_buff_data_t        rdata;

  vrf_slice dut (
    .clk_i(clk), .rsn_i(rsn), .we_i(we), .wbank_i(wbank), .waddr_i(waddr), .wdata_i(wdata),
    .req_i(req), .resp_o(resp), .info_i(info), .rdata_o(rdata)
  );

  int checks = 0, failures = 0;
  elen_t shadow [N_BANKS][VRF_ROWS];
  int n_conflict = 0, n_unaligned = 0;

  function automatic stbf2vrf_t line_info(int p, int l);
    stbf2vrf_t r;
    r.preg = preg_t'(p);
    for (int j = 0; j < N_BANKS; j++) begin
      int a;
      a = p * CELLS_PER_REG + l * N_BANKS + j;
      r.saddr[a % N_BANKS] = vrf_addr_t'(a / N_BANKS);
    end
    return r;
  endfunction

  initial begin
    we = 0; req = '0; info = '0; wbank = '0; waddr = '0; wdata = '0;
    repeat (2) @(posedge clk);
    rsn = 1;
    for (int b = 0; b < N_BANKS; b++)
      for (int r = 0; r < VRF_ROWS; r++) begin
        @(negedge clk);
        we = 1; wbank = BANK_ID_W'(b); waddr = vrf_addr_t'(r); wdata = {$urandom, $urandom};
        shadow[b][r] = wdata;
      end
    @(negedge clk);
    we = 0;
    for (int t = 0; t < 2000; t++) begin
      int p[2], l[2], winner;
      for (int k = 0; k < 2; k++) begin
        p[k] = $urandom_range(0, N_PREGS - 1);
        l[k] = $urandom_range(0, CELLS_PER_REG / N_BANKS - 1);
        req[k] = ($urandom_range(0, 2) != 0);
        info[k] = line_info(p[k], l[k]);
      end
      winner = req[0] ? 0 : req[1] ? 1 : -1;
      if (req == 2'b11) n_conflict++;
      @(posedge clk);
      checks++;
      if (resp !== ((winner < 0) ? 2'b00 : (winner == 0) ? 2'b01 : 2'b10)) begin
        failures++; $display("FAIL: grant %b for requests %b", resp, req);
      end
      @(negedge clk);
      req = '0;
      if (winner >= 0) begin
        if ((p[winner] * CELLS_PER_REG) % N_BANKS != 0) n_unaligned++;
        for (int j = 0; j < N_BANKS; j++) begin
          int a;
          a = p[winner] * CELLS_PER_REG + l[winner] * N_BANKS + j;
          checks++;
          if (rdata[j] !== shadow[a % N_BANKS][a / N_BANKS]) begin
            failures++;
            $display("FAIL: preg %0d line %0d cell %0d got %h exp %h", p[winner], l[winner], j,
                     rdata[j], shadow[a % N_BANKS][a / N_BANKS]);
          end
        end
      end
    end
    checks++; if (n_conflict == 0 || n_unaligned == 0) begin failures++; $display("FAIL: coverage"); end
    $display("conflicts=%0d unaligned=%0d", n_conflict, n_unaligned);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
