// vlsu_pkg: configuration constants and shared types of the vector memory
// element-movement datapath (store and index paths of a decoupled vector
// load/store unit).
//
// The configuration is the main one: 4 vector lanes, 5 VRF banks per lane,
// ELEN = 64 bits, minimum SEW = 8 bits, a 512-bit (64-byte) L2 cache line,
// 2-entry lane buffers and 40 physical vector registers. A data package that
// crosses from the lane buffers to the SMU/IMU is one ELEN word per lane,
// i.e. 256 bits. VLEN is not fixed by the source material; 4096 bits is this
// design's choice (16 ELEN cells per lane per register).
//
// All modules of the datapath take their sizes from this package, so the
// whole design is resized by editing the constants below.
package vlsu_pkg;

  // ------------------------------------------------------------------
  // Configuration
  // ------------------------------------------------------------------
  localparam int unsigned N_LANES    = 4;    // vector lanes
  localparam int unsigned N_BANKS    = 5;    // VRF banks per lane
  localparam int unsigned ELEN       = 64;   // max element width, bits
  localparam int unsigned XLEN       = 64;   // scalar register width
  localparam int unsigned MIN_SEW    = 8;    // smallest element width
  localparam int unsigned L2_LINE_W  = 512;  // L2 cache line, bits
  localparam int unsigned ST_BF_SIZE = 2;    // lane buffer entries
  localparam int unsigned N_PREGS    = 40;   // physical vector registers
  localparam int unsigned VLEN       = 4096; // bits per vector register (own choice)
  localparam int unsigned VMOT_ID_W  = 3;    // load/store unit id width (own choice)
  localparam int unsigned RQ_ID_W    = 4;    // request queue tag width (own choice)

  // ------------------------------------------------------------------
  // Derived sizes
  // ------------------------------------------------------------------
  localparam int unsigned ELEN_BYTES   = ELEN / 8;                 // 8
  localparam int unsigned PKG_W        = N_LANES * ELEN;           // 256
  localparam int unsigned PKG_BYTES    = PKG_W / 8;                // 32
  localparam int unsigned LINE_BYTES   = L2_LINE_W / 8;            // 64
  localparam int unsigned PKGS_PER_LINE = LINE_BYTES / PKG_BYTES;  // 2
  // one VRF line across all lanes, in bytes (N_LANES*N_BANKS*ELEN/MIN_SEW)
  localparam int unsigned VRF_LINE_BYTES = N_LANES * N_BANKS * ELEN / MIN_SEW; // 160
  localparam int unsigned ROW_W        = $clog2(VRF_LINE_BYTES);   // 8
  localparam int unsigned CELLS_PER_REG = VLEN / (ELEN * N_LANES); // 16 ELEN cells per lane
  localparam int unsigned VRF_ROWS     = (N_PREGS * CELLS_PER_REG + N_BANKS - 1) / N_BANKS; // 128
  localparam int unsigned VRF_ADDR_W   = $clog2(VRF_ROWS);         // 7
  localparam int unsigned PREG_W       = $clog2(N_PREGS);          // 6
  localparam int unsigned LINE_IDX_W   = $clog2(LINE_BYTES);       // 6
  localparam int unsigned PKG_IDX_W    = $clog2(PKG_BYTES);        // 5
  localparam int unsigned BANK_ID_W    = $clog2(N_BANKS);          // 3
  localparam int unsigned STBF_DEPTH   = ST_BF_SIZE * N_BANKS;     // 10 ELEN words
  localparam int unsigned ELEM_ID_W    = $clog2(VLEN / MIN_SEW);   // 9

  // ------------------------------------------------------------------
  // Scalar types
  // ------------------------------------------------------------------
  typedef logic [XLEN-1:0]                xlen_t;
  typedef logic [ELEN-1:0]                elen_t;
  typedef logic [PKG_W-1:0]               buffers_data_t;   // one ELEN per lane
  typedef logic [L2_LINE_W-1:0]           l2_cache_line_t;
  typedef logic [LINE_BYTES-1:0]          l2_cache_line_mask_t;
  typedef logic [LINE_IDX_W-1:0]          l2_cache_line_idx_t;
  typedef logic [LINE_IDX_W:0]            elem_count_t;     // 0..64 bytes / elements
  typedef logic [LINE_IDX_W-1:0]          elem_offset_t;    // byte offset in a line
  typedef logic [ELEM_ID_W-1:0]           elem_id_t;
  typedef logic [PKG_IDX_W:0]             all_lanes_bytes_num_t; // 0..32
  typedef logic [ROW_W-1:0]               row_t;
  typedef logic [PREG_W-1:0]              preg_t;
  typedef logic [VRF_ADDR_W-1:0]          vrf_addr_t;
  typedef logic [VMOT_ID_W-1:0]           vmot_id_t;
  typedef logic [RQ_ID_W-1:0]             rqueue_id_t;
  typedef logic [N_BANKS-1:0][ELEN-1:0]   st_buff_data_t;   // one VRF line of a lane

  // RVV v0.7 vsew encoding
  typedef enum logic [2:0] {
    SEW8  = 3'd0,
    SEW16 = 3'd1,
    SEW32 = 3'd2,
    SEW64 = 3'd3
  } vsew_e;

  typedef enum logic [1:0] {
    OP_UNIT    = 2'd0,
    OP_STRIDED = 2'd1,
    OP_INDEXED = 2'd2
  } mem_op_mode_e;

  // ------------------------------------------------------------------
  // Interface structs
  // ------------------------------------------------------------------
  // Address queue -> SMU: byte offset of the first valid element inside
  // the first VRF line (taken from vstart).
  typedef struct packed {
    row_t row;
  } mqueue2smu_t;

  // Request queue -> SMU: one store request (one L2 line).
  typedef struct packed {
    mem_op_mode_e        opmode;
    xlen_t               stride;      // bytes, signed
    vsew_e               vsew;
    logic                last;        // last request of the instruction
    elem_id_t            elem_id;     // first element of the request
    elem_count_t         elem_cnt;    // elements in the request
    elem_offset_t        elem_offset; // byte position of the first element in the line
    vmot_id_t            vmot_id;
    logic                kill;
    rqueue_id_t          tag;
    l2_cache_line_mask_t line_mask;
  } rqueue_smu_info_t;

  // SMU -> request queue: assembled line.
  typedef struct packed {
    vmot_id_t            vmot_id;
    logic                kill;
    rqueue_id_t          tag;
    l2_cache_line_mask_t line_mask;
    l2_cache_line_t      data;
  } smu_rqueue_resp_t;

  // Address queue -> store buffer / index buffer.
  typedef struct packed {
    row_t  line_offset;  // first VRF line of the register to read
    preg_t preg;         // physical source register
  } mqueue2stbf_t;

  typedef mqueue2stbf_t mqueue2idxbf_t;

  // Store buffer / index buffer -> VRF: one address per bank.
  typedef struct packed {
    vrf_addr_t [N_BANKS-1:0] saddr;
    preg_t                   preg;
  } stbf2vrf_t;

  typedef stbf2vrf_t idxbf2vrf_t;

  // Address queue -> IMU.
  typedef struct packed {
    row_t  row;
    vsew_e vsew;
  } mqueue2imu_t;

  // ------------------------------------------------------------------
  // Helpers
  // ------------------------------------------------------------------
  function automatic elem_count_t vsew_bytes(vsew_e vsew);
    return elem_count_t'(1) << vsew[1:0];
  endfunction

  // Row of bank `bank` holding the first cell of physical register `preg`.
  // Registers are laid out back to back, CELLS_PER_REG cells each, and
  // cell c of the lane lives in bank c % N_BANKS, row c / N_BANKS.
  function automatic vrf_addr_t vrf_mapping(preg_t preg, int unsigned bank);
    int unsigned base;
    int unsigned first;
    base  = int'(preg) * CELLS_PER_REG;
    first = (bank + N_BANKS - (base % N_BANKS)) % N_BANKS;
    return vrf_addr_t'((base + first) / N_BANKS);
  endfunction

  // Bank holding cell 0 of a register's line (the shuffle rotation).
  function automatic logic [BANK_ID_W-1:0] vrf_first_bank(preg_t preg);
    return BANK_ID_W'((int'(preg) * CELLS_PER_REG) % N_BANKS);
  endfunction

endpackage
