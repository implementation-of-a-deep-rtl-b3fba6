// tb_axi_mem - behavioural model of system memory behind an AXI4 slave port,
// for testbenches. Not synthesizable.
//
// WORDS 64-bit words addressed by addr[3 +: log2(WORDS)]. Single-beat bursts
// only. Read and write channels accept requests with a random ready
// (probability READY_PCT %), reads return after LAT cycles in request order,
// write responses follow the write by one or two cycles. The array `mem`
// is accessed directly by the testbench to load inputs and check outputs.
module tb_axi_mem
  import nvdla_pkg::*;
#(
  parameter int unsigned WORDS     = 65536,
  parameter int unsigned LAT       = 4,
  parameter int unsigned READY_PCT = 70
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  awvalid,
  output logic                  awready,
  input  logic [AXI_IDW-1:0]    awid,
  input  logic [MEM_AW-1:0]     awaddr,
  input  logic                  wvalid,
  output logic                  wready,
  input  logic [MEMIF_DW-1:0]   wdata,
  output logic                  bvalid,
  input  logic                  bready,
  output logic [AXI_IDW-1:0]    bid,
  input  logic                  arvalid,
  output logic                  arready,
  input  logic [AXI_IDW-1:0]    arid,
  input  logic [MEM_AW-1:0]     araddr,
  output logic                  rvalid,
  input  logic                  rready,
  output logic [AXI_IDW-1:0]    rid,
  output logic                  rlast,
  output logic [MEMIF_DW-1:0]   rdata
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [63:0] mem [WORDS];

  typedef struct { int unsigned due; logic [AXI_IDW-1:0] id; logic [AW-1:0] a; } rreq_t;
  rreq_t                  rq[$];
  logic [AW-1:0]          awq[$];
  logic [AXI_IDW-1:0]     awidq[$];
  logic [63:0]            wq[$];
  logic [AXI_IDW-1:0]     bq[$];
  int unsigned            cyc;

  assign rlast = 1'b1;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc <= 0;
      arready <= 1'b0;
      awready <= 1'b0;
      wready  <= 1'b0;
      rvalid  <= 1'b0;
      bvalid  <= 1'b0;
      rid <= '0; bid <= '0; rdata <= '0;
      rq.delete(); awq.delete(); awidq.delete(); wq.delete(); bq.delete();
    end else begin
      cyc <= cyc + 1;
      if (arvalid && arready) rq.push_back('{cyc + LAT, arid, araddr[3 +: AW]});
      if (awvalid && awready) begin awq.push_back(awaddr[3 +: AW]); awidq.push_back(awid); end
      if (wvalid && wready) wq.push_back(wdata);
      arready <= ($urandom % 100) < READY_PCT;
      awready <= ($urandom % 100) < READY_PCT;
      wready  <= ($urandom % 100) < READY_PCT;
      // read data
      if (rvalid && rready) rvalid <= 1'b0;
      if ((!rvalid || rready) && rq.size() > 0 && rq[0].due <= cyc) begin
        rreq_t h;
        h = rq.pop_front();
        rvalid <= 1'b1;
        rid    <= h.id;
        rdata  <= mem[h.a];
      end
      // writes
      if (awq.size() > 0 && wq.size() > 0) begin
        logic [AW-1:0] wa;
        logic [63:0]   wd;
        wa = awq.pop_front();
        wd = wq.pop_front();
        mem[wa] = wd;
        bq.push_back(awidq.pop_front());
      end
      if (bvalid && bready) bvalid <= 1'b0;
      if ((!bvalid || bready) && bq.size() > 0 && ($urandom % 2) == 0) begin
        bvalid <= 1'b1;
        bid    <= bq.pop_front();
      end
    end
  end

endmodule
