// nvdla_pkg - configuration constants, shared types and register map of the
// accelerator core.
//
// The constants are the "small" configuration of the accelerator: an 8 x 8
// int8 MAC array (Atomic-C = 8 input channels, Atomic-K = 8 output channels),
// a convolution buffer of 32 banks of 512 entries of 8 bytes (128 KiB), a
// 64-bit data backbone with 32-bit addresses, 64 outstanding memory reads and
// single-beat bursts, and one element per cycle through SDP, PDP and CDP.
// These numbers come from the small configuration's specification.
//
// Everything else here is this design's own choice: the data layout in
// memory, the register map, and the config structs decoded from it.
//
// Data layout in memory and in the convolution buffer. An "atom" is one
// 64-bit word holding 8 int8 channels of one pixel. A feature cube of W x H
// pixels and C = 8*CG channels is stored as atoms in order [y][x][cg].
// Weights for K = 8*KG kernels of R x S taps are stored as atoms in order
// [kg][r][s][cg][k], each atom holding 8 input channels of one kernel.
//
// Register map (CSB word addresses). Bits [15:8] select the unit:
//   0x00 GLB   0x01 CFGROM   0x10 CONV (CDMA+CSC+CMAC+CACC+SDP)
//   0x20 PDP   0x30 CDP      0x31 CDP look-up table
// Inside a ping-pong unit: 0x00 S_STATUS (RO), 0x01 S_POINTER,
// 0x10 + i D register i of the group selected by the producer pointer
// (D0 = OP_ENABLE). See the decode functions below for the D fields.
package nvdla_pkg;

  // ---------------- configuration (small configuration) ----------------
  localparam int unsigned ATOMIC_C        = 8;    // input channels per MAC cell
  localparam int unsigned ATOMIC_K        = 8;    // MAC cells (output channels)
  localparam int unsigned CBUF_BANK_NUM   = 32;
  localparam int unsigned CBUF_BANK_WIDTH = 8;    // bytes per entry
  localparam int unsigned CBUF_BANK_DEPTH = 512;
  localparam int unsigned MEMIF_DW        = 64;   // data backbone width (bits)
  localparam int unsigned MEM_AW          = 32;   // memory address width
  localparam int unsigned MEMIF_LATENCY   = 64;   // outstanding reads allowed
  localparam int unsigned MEMIF_BURST     = 1;    // beats per burst
  localparam int unsigned NUM_RD          = 3;    // read clients: CDMA, PDP, CDP
  localparam int unsigned NUM_WR          = 3;    // write clients: SDP, PDP, CDP
  localparam int unsigned AXI_IDW         = 4;

  localparam int unsigned CSB_AW = 16;
  localparam int unsigned CSB_DW = 32;

  localparam int unsigned CBUF_ENTRIES = CBUF_BANK_NUM * CBUF_BANK_DEPTH;
  localparam int unsigned CBUF_AW      = $clog2(CBUF_ENTRIES);

  // register groups: D0..D15
  localparam int unsigned NREG = 16;

  // read / write client numbers on the memory interface
  localparam int unsigned RD_CDMA = 0, RD_PDP = 1, RD_CDP = 2;
  localparam int unsigned WR_SDP  = 0, WR_PDP = 1, WR_CDP = 2;

  // unit selects (CSB address bits [15:8])
  localparam logic [7:0] UNIT_GLB = 8'h00, UNIT_CFGROM = 8'h01, UNIT_CONV = 8'h10,
                         UNIT_PDP = 8'h20, UNIT_CDP = 8'h30, UNIT_CDP_LUT = 8'h31;

  // interrupt status bits in GLB
  localparam int unsigned INTR_CDMA = 0;   // bits 1:0, one per register group
  localparam int unsigned INTR_CONV = 2;   // bits 3:2, layer written back by SDP
  localparam int unsigned INTR_PDP  = 4;   // bits 5:4
  localparam int unsigned INTR_CDP  = 6;   // bits 7:6
  localparam int unsigned NUM_INTR  = 8;

  // CDP look-up table
  localparam int unsigned CDP_LUT_N  = 64;
  localparam int unsigned CDP_MAX_CG = 8;  // up to 64 channels per pixel
  localparam int unsigned CDP_MAX_N  = 9;  // widest normalisation window

  typedef logic [ATOMIC_C-1:0][7:0] atom_t;        // 8 x int8
  typedef logic [MEM_AW-1:0]        addr_t;
  typedef logic [NREG-1:0][31:0]    regs_t;

  // register access from the CSB slave to one unit
  typedef struct packed {
    logic        wr;
    logic        rd;
    logic [7:0]  addr;
    logic [31:0] wdat;
  } reg_req_t;

  // ---------------- CONV unit configuration ----------------
  typedef enum logic [1:0] {ACT_NONE = 2'd0, ACT_RELU = 2'd1, ACT_PRELU = 2'd2} act_e;

  typedef struct packed {
    addr_t              src_addr;     // D1  input cube
    addr_t              wt_addr;      // D2  weights
    addr_t              dst_addr;     // D3  output cube
    logic [15:0]        in_w, in_h;   // D4  {in_h, in_w}
    logic [7:0]         kw, kh;       // D5  [7:0] S, [15:8] R
    logic [7:0]         cg, kg;       // D5  [23:16] CG, [31:24] KG
    logic [4:0]         wt_bank;      // D6  [4:0] first weight bank
    logic               img;          // D6  [8] image input: 4-byte pixels, cg = 1
    logic [3:0]         stride;       // D7  [3:0]
    logic [3:0]         pad_x, pad_y; // D7  [11:8] left, [15:12] top zero padding
    logic [15:0]        out_w, out_h; // D8  {out_h, out_w}
    logic signed [31:0] bias;         // D9
    logic signed [15:0] scale;        // D10 [15:0]
    logic [5:0]         shift;        // D10 [21:16]
    act_e               act;          // D11 [1:0]
    logic signed [7:0]  prelu_a;      // D11 [15:8]
    logic [4:0]         prelu_shift;  // D11 [20:16]
  } conv_cfg_t;

  function automatic conv_cfg_t conv_cfg(regs_t r);
    conv_cfg_t c;
    c.src_addr    = r[1];
    c.wt_addr     = r[2];
    c.dst_addr    = r[3];
    c.in_w        = r[4][15:0];
    c.in_h        = r[4][31:16];
    c.kw          = r[5][7:0];
    c.kh          = r[5][15:8];
    c.cg          = r[5][23:16];
    c.kg          = r[5][31:24];
    c.wt_bank     = r[6][4:0];
    c.img         = r[6][8];
    c.stride      = r[7][3:0];
    c.pad_x       = r[7][11:8];
    c.pad_y       = r[7][15:12];
    c.out_w       = r[8][15:0];
    c.out_h       = r[8][31:16];
    c.bias        = r[9];
    c.scale       = r[10][15:0];
    c.shift       = r[10][21:16];
    c.act         = act_e'(r[11][1:0]);
    c.prelu_a     = r[11][15:8];
    c.prelu_shift = r[11][20:16];
    return c;
  endfunction

  // ---------------- PDP configuration ----------------
  typedef enum logic [1:0] {POOL_MAX = 2'd0, POOL_MIN = 2'd1, POOL_AVG = 2'd2} pool_e;

  typedef struct packed {
    addr_t       src_addr;      // D1
    addr_t       dst_addr;      // D2
    logic [15:0] in_w, in_h;    // D3
    logic [15:0] out_w, out_h;  // D4
    logic [7:0]  kw, kh;        // D5 [7:0], [15:8]
    logic [3:0]  sx, sy;        // D5 [19:16], [23:20]
    logic [7:0]  cg;            // D5 [31:24]
    logic [15:0] recip;         // D6 [15:0]  round(65536 / (kw*kh))
    pool_e       mode;          // D6 [17:16]
  } pdp_cfg_t;

  function automatic pdp_cfg_t pdp_cfg(regs_t r);
    pdp_cfg_t c;
    c.src_addr = r[1];
    c.dst_addr = r[2];
    c.in_w     = r[3][15:0];
    c.in_h     = r[3][31:16];
    c.out_w    = r[4][15:0];
    c.out_h    = r[4][31:16];
    c.kw       = r[5][7:0];
    c.kh       = r[5][15:8];
    c.sx       = r[5][19:16];
    c.sy       = r[5][23:20];
    c.cg       = r[5][31:24];
    c.recip    = r[6][15:0];
    c.mode     = pool_e'(r[6][17:16]);
    return c;
  endfunction

  // ---------------- CDP configuration ----------------
  typedef struct packed {
    addr_t       src_addr;   // D1
    addr_t       dst_addr;   // D2
    logic [31:0] npix;       // D3  pixels (W*H)
    logic [7:0]  cg;         // D4  [7:0]
    logic [3:0]  n;          // D4  [11:8] window size (odd, <= 9)
    logic [4:0]  lut_shift;  // D5  [4:0]  LUT index = sum of squares >> lut_shift
    logic [4:0]  out_shift;  // D5  [12:8] out = x * LUT >>> out_shift
  } cdp_cfg_t;

  function automatic cdp_cfg_t cdp_cfg(regs_t r);
    cdp_cfg_t c;
    c.src_addr  = r[1];
    c.dst_addr  = r[2];
    c.npix      = r[3];
    c.cg        = r[4][7:0];
    c.n         = r[4][11:8];
    c.lut_shift = r[5][4:0];
    c.out_shift = r[5][12:8];
    return c;
  endfunction

  // tag travelling with a feature atom from CSC through CMAC to CACC
  typedef struct packed {
    logic [15:0] pix;    // output pixel index, oy*out_w + ox
    logic [7:0]  kg;     // kernel group
    logic        first;  // first (r, s, cg) step: overwrite the accumulator
    logic        last;   // last (r, s, cg) step: the sum is complete
  } conv_tag_t;

  // saturate a signed value to int8
  function automatic logic [7:0] sat8(logic signed [63:0] v);
    if (v > 64'sd127)       return 8'h7f;
    else if (v < -64'sd128) return 8'h80;
    else                    return v[7:0];
  endfunction

endpackage
