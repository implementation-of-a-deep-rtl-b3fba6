// nvdla_glb - interrupt collection of the core.
//
// Every unit reports a one-cycle done event per register group. GLB latches
// the events in INTR_STATUS and drives the single level-sensitive interrupt
// dla_intr while any unmasked status bit is set. The host clears bits by
// writing 1 to them (write-one-to-clear). INTR_SET lets software raise
// status bits, which is useful to test the interrupt path.
//
// Registers (word offsets): 0x00 HW_VERSION (RO), 0x01 INTR_MASK (RW, a set
// bit masks the source), 0x02 INTR_SET (WO), 0x03 INTR_STATUS (R, W1C).
// Status bits: 1:0 CDMA, 3:2 CONV (layer written back by SDP), 5:4 PDP,
// 7:6 CDP, one bit per register group. dla_intr is registered.
//
// One level interrupt reporting completion of every unit follows the
// description; the register layout is this design's.
module nvdla_glb
  import nvdla_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sel,
  input  reg_req_t            req,
  output logic [31:0]         rdata,
  input  logic [NUM_INTR-1:0] ev,
  output logic                intr
);

  localparam logic [31:0] HW_VERSION = 32'h0001_0000;

  logic [NUM_INTR-1:0] mask, status;

  always_comb begin
    case (req.addr)
      8'h00:   rdata = HW_VERSION;
      8'h01:   rdata = 32'(mask);
      8'h03:   rdata = 32'(status);
      default: rdata = '0;
    endcase
  end

  // next status: new events, then software set / write-one-to-clear
  logic [NUM_INTR-1:0] nxt;
  always_comb begin
    nxt = status | ev;
    if (sel && req.wr && req.addr == 8'h02) nxt = nxt | req.wdat[NUM_INTR-1:0];
    if (sel && req.wr && req.addr == 8'h03) nxt = nxt & ~req.wdat[NUM_INTR-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mask   <= '0;
      status <= '0;
      intr   <= 1'b0;
    end else begin
      if (sel && req.wr && req.addr == 8'h01) mask <= req.wdat[NUM_INTR-1:0];
      status <= nxt;
      intr   <= |(status & ~mask);
    end
  end

endmodule
