// nvdla_mcif - memory client interface: shares the AXI4 data backbone among
// the DMA engines of the core.
//
// Read side: NUM_RD clients request single 64-bit words (req_valid/ready
// with a byte address). A round-robin arbiter grants one request per cycle
// to the AR channel; the AXI read ID is the client number, so responses
// return on the R channel to the client that asked, in the order that
// client asked. Up to MEMIF_LATENCY reads may be outstanding; clients must
// accept a response in any cycle (rd_resp_valid has no ready).
// Write side: NUM_WR clients request single-word writes. A round-robin
// arbiter picks one client, drives AW and W together (one beat, all strobes
// set), and acknowledges the client once both channels have handshaken.
// The B response (ID = client) raises wr_ack for that client, which the
// engines count to know when their output has reached memory.
// Bursts are one beat (arlen = awlen = 0) and 8 bytes wide (size 3).
//
// The single 64-bit AXI4 master, 32-bit addresses, single-beat bursts and
// the limit on outstanding reads come from the small configuration; the
// arbitration scheme and the client handshake are this design's choices.
module nvdla_mcif
  import nvdla_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  // read clients
  input  logic [NUM_RD-1:0]         rd_req_valid,
  output logic [NUM_RD-1:0]         rd_req_ready,
  input  addr_t [NUM_RD-1:0]        rd_req_addr,
  output logic [NUM_RD-1:0]         rd_resp_valid,
  output logic [MEMIF_DW-1:0]       rd_resp_data,
  // write clients
  input  logic [NUM_WR-1:0]         wr_req_valid,
  output logic [NUM_WR-1:0]         wr_req_ready,
  input  addr_t [NUM_WR-1:0]        wr_req_addr,
  input  logic [NUM_WR-1:0][MEMIF_DW-1:0] wr_req_data,
  output logic [NUM_WR-1:0]         wr_ack,
  // AXI4 master
  output logic                      aw_awvalid,
  input  logic                      aw_awready,
  output logic [AXI_IDW-1:0]        aw_awid,
  output logic [7:0]                aw_awlen,
  output logic [2:0]                aw_awsize,
  output addr_t                     aw_awaddr,
  output logic                      w_wvalid,
  input  logic                      w_wready,
  output logic [MEMIF_DW-1:0]       w_wdata,
  output logic [MEMIF_DW/8-1:0]     w_wstrb,
  output logic                      w_wlast,
  input  logic                      b_bvalid,
  output logic                      b_bready,
  input  logic [AXI_IDW-1:0]        b_bid,
  output logic                      ar_arvalid,
  input  logic                      ar_arready,
  output logic [AXI_IDW-1:0]        ar_arid,
  output logic [7:0]                ar_arlen,
  output logic [2:0]                ar_arsize,
  output addr_t                     ar_araddr,
  input  logic                      r_rvalid,
  output logic                      r_rready,
  input  logic [AXI_IDW-1:0]        r_rid,
  input  logic                      r_rlast,
  input  logic [MEMIF_DW-1:0]       r_rdata
);

  localparam int unsigned OW = $clog2(MEMIF_LATENCY + 1);

  // ---------------- read path ----------------
  logic [$clog2(NUM_RD)-1:0] rd_last, rd_pick;
  logic                      rd_any;
  logic [OW-1:0]             outstanding;
  logic                      rd_room;

  always_comb begin
    rd_any  = 1'b0;
    rd_pick = rd_last;
    // round robin: first requester after the last granted one
    for (int i = 1; i <= NUM_RD; i++) begin
      int c;
      c = (int'(rd_last) + i) % NUM_RD;
      if (!rd_any && rd_req_valid[c]) begin
        rd_any  = 1'b1;
        rd_pick = c[$clog2(NUM_RD)-1:0];
      end
    end
  end

  assign rd_room    = outstanding < OW'(MEMIF_LATENCY);
  assign ar_arvalid = rd_any && rd_room;
  assign ar_arid    = AXI_IDW'(rd_pick);
  assign ar_araddr  = rd_req_addr[rd_pick];
  assign ar_arlen   = 8'(MEMIF_BURST - 1);
  assign ar_arsize  = 3'($clog2(MEMIF_DW / 8));

  always_comb begin
    rd_req_ready = '0;
    rd_req_ready[rd_pick] = ar_arvalid && ar_arready;
  end

  assign r_rready     = 1'b1;
  assign rd_resp_data = r_rdata;
  always_comb begin
    rd_resp_valid = '0;
    if (r_rvalid && int'(r_rid) < NUM_RD) rd_resp_valid[r_rid[$clog2(NUM_RD)-1:0]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_last     <= '0;
      outstanding <= '0;
    end else begin
      if (ar_arvalid && ar_arready) rd_last <= rd_pick;
      outstanding <= outstanding + OW'(ar_arvalid && ar_arready)
                                 - OW'(r_rvalid && r_rready && r_rlast);
    end
  end

  // ---------------- write path ----------------
  logic [$clog2(NUM_WR)-1:0] wr_last, wr_pick, wr_cur;
  logic                      wr_any, wr_busy, aw_done, w_done;

  always_comb begin
    wr_any  = 1'b0;
    wr_pick = wr_last;
    for (int i = 1; i <= NUM_WR; i++) begin
      int c;
      c = (int'(wr_last) + i) % NUM_WR;
      if (!wr_any && wr_req_valid[c]) begin
        wr_any  = 1'b1;
        wr_pick = c[$clog2(NUM_WR)-1:0];
      end
    end
  end

  assign aw_awvalid = wr_busy && !aw_done;
  assign w_wvalid   = wr_busy && !w_done;
  assign aw_awid    = AXI_IDW'(wr_cur);
  assign aw_awaddr  = wr_req_addr[wr_cur];
  assign aw_awlen   = 8'(MEMIF_BURST - 1);
  assign aw_awsize  = 3'($clog2(MEMIF_DW / 8));
  assign w_wdata    = wr_req_data[wr_cur];
  assign w_wstrb    = '1;
  assign w_wlast    = 1'b1;
  assign b_bready   = 1'b1;

  logic aw_fin, w_fin, wr_fin;
  assign aw_fin = aw_done || (aw_awvalid && aw_awready);
  assign w_fin  = w_done  || (w_wvalid && w_wready);
  assign wr_fin = wr_busy && aw_fin && w_fin;

  always_comb begin
    wr_req_ready = '0;
    wr_req_ready[wr_cur] = wr_fin;
  end

  always_comb begin
    wr_ack = '0;
    if (b_bvalid && int'(b_bid) < NUM_WR) wr_ack[b_bid[$clog2(NUM_WR)-1:0]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_last <= '0;
      wr_cur  <= '0;
      wr_busy <= 1'b0;
      aw_done <= 1'b0;
      w_done  <= 1'b0;
    end else if (!wr_busy) begin
      if (wr_any) begin
        wr_busy <= 1'b1;
        wr_cur  <= wr_pick;
        wr_last <= wr_pick;
      end
    end else if (wr_fin) begin
      wr_busy <= 1'b0;
      aw_done <= 1'b0;
      w_done  <= 1'b0;
    end else begin
      aw_done <= aw_fin;
      w_done  <= w_fin;
    end
  end

  // a client must keep its request steady until it is accepted
  a_wr_stable: assert property (@(posedge clk) disable iff (!rst_n)
      wr_busy && !wr_fin |=> wr_req_valid[wr_cur]);
  a_outstanding: assert property (@(posedge clk) disable iff (!rst_n)
      outstanding <= OW'(MEMIF_LATENCY));

endmodule
