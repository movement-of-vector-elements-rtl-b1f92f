// vrf_slice: one lane's slice of the vector register file, as seen by the
// lane buffers of the memory path.
//
// The slice is N_BANKS single-read-port banks of VRF_ROWS x ELEN. A vector
// register holds CELLS_PER_REG ELEN cells in each lane; registers are stored
// back to back, cell c of the lane's linear cell space in bank c % N_BANKS,
// row c / N_BANKS. A "line" of a register is N_BANKS consecutive cells, so
// reading a line touches every bank once, at a per-bank row given by the
// requester (saddr[b]); for registers whose first cell is not in bank 0 a
// line spans two rows. The banks' outputs are shuffled back into cell order
// (cell j of the line comes from bank (first_bank(preg) + j) % N_BANKS)
// before they are returned.
//
// Two read requesters share the banks: port 0 (index buffer) and port 1
// (store buffer). A fixed-priority arbiter grants one request per cycle,
// port 0 first, through resp_o; the line appears on rdata_o in the cycle
// after the grant (registered bank outputs). One write port (one cell per
// cycle) fills the banks.
//
// The bank count, the layout and the shuffle follow the source design; the
// register size (VLEN), the two-requester arbiter, its fixed priority and
// the write port are this design's choices (the arithmetic and load paths
// that also use the VRF are outside this datapath).
module vrf_slice
  import vlsu_pkg::*;
#(
  parameter int unsigned N_PORTS = 2
) (
  input  logic                       clk_i,
  input  logic                       rsn_i,
  // write port
  input  logic                       we_i,
  input  logic [BANK_ID_W-1:0]       wbank_i,
  input  vrf_addr_t                  waddr_i,
  input  elen_t                      wdata_i,
  // read ports
  input  logic      [N_PORTS-1:0]    req_i,
  output logic      [N_PORTS-1:0]    resp_o,
  input  stbf2vrf_t [N_PORTS-1:0]    info_i,
  output st_buff_data_t              rdata_o
);

  elen_t mem [N_BANKS][VRF_ROWS];

  elen_t [N_BANKS-1:0]  bank_q;
  logic [BANK_ID_W-1:0] first_bank_q;
  stbf2vrf_t            sel_info;
  logic                 any_req;

  // fixed-priority arbiter, lowest port index first
  always_comb begin
    resp_o   = '0;
    sel_info = info_i[0];
    any_req  = 1'b0;
    for (int p = N_PORTS - 1; p >= 0; p--) begin
      if (req_i[p]) begin
        resp_o   = '0;
        resp_o[p] = 1'b1;
        sel_info = info_i[p];
        any_req  = 1'b1;
      end
    end
  end

  always_ff @(posedge clk_i) begin
    if (we_i) mem[wbank_i][waddr_i] <= wdata_i;
  end

  always_ff @(posedge clk_i or negedge rsn_i) begin
    if (!rsn_i) begin
      bank_q       <= '0;
      first_bank_q <= '0;
    end else if (any_req) begin
      for (int unsigned b = 0; b < N_BANKS; b++)
        bank_q[b] <= mem[b][sel_info.saddr[b]];
      first_bank_q <= vrf_first_bank(sel_info.preg);
    end
  end

  // shuffle the banks into cell order
  always_comb begin
    for (int unsigned j = 0; j < N_BANKS; j++)
      rdata_o[j] = bank_q[(int'(first_bank_q) + j) % N_BANKS];
  end

  a_one_grant: assert property (@(posedge clk_i) disable iff (!rsn_i) $onehot0(resp_o));
  a_wbank_ok:  assert property (@(posedge clk_i) disable iff (!rsn_i)
                                we_i |-> int'(wbank_i) < N_BANKS);

endmodule
