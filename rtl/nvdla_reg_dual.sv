// nvdla_reg_dual - ping-pong register groups of one processing unit.
//
// Each unit owns two groups of NREG 32-bit D registers. The host writes the
// group named by the producer pointer while the unit executes the group
// named by the consumer pointer, so a new layer can be programmed while the
// previous one runs. Writing 1 to bit 0 of D0 (OP_ENABLE) hands a group to
// the unit. When the unit reports done, the OP_ENABLE of the consumer group
// clears, a done event for that group is raised for one cycle (to GLB) and
// the consumer pointer flips to the other group; if that group is already
// enabled the unit starts it at once.
//
// Register offsets (word): 0x00 S_STATUS (RO: bit 0 group 0 enabled,
// bit 16 group 1 enabled), 0x01 S_POINTER (bit 0 producer, RW; bit 16
// consumer, RO), 0x10+i D register i of the producer group. D registers of
// an enabled group ignore writes. Reads are combinational.
//
// The two register groups switched on completion follow the described
// ping-pong mechanism; the pointer and status registers are this design's.
module nvdla_reg_dual
  import nvdla_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sel,
  input  reg_req_t    req,
  output logic [31:0] rdata,
  output regs_t       cfg,       // D registers of the consumer group
  output logic        op_en,     // consumer group is enabled
  output logic        cur_group, // consumer pointer
  input  logic        done,      // unit finished the consumer group
  output logic [1:0]  done_ev    // one-cycle event per group
);

  regs_t grp [2];
  logic  producer, consumer;

  assign cfg   = grp[consumer];
  assign op_en = grp[consumer][0][0];
  assign cur_group = consumer;

  always_comb begin
    rdata = '0;
    if (req.addr == 8'h00)      rdata = {15'd0, grp[1][0][0], 15'd0, grp[0][0][0]};
    else if (req.addr == 8'h01) rdata = {15'd0, consumer, 15'd0, producer};
    else if (req.addr[7:4] == 4'h1) rdata = grp[producer][req.addr[3:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      grp[0]   <= '0;
      grp[1]   <= '0;
      producer <= 1'b0;
      consumer <= 1'b0;
      done_ev  <= '0;
    end else begin
      done_ev <= '0;
      if (sel && req.wr) begin
        if (req.addr == 8'h01) producer <= req.wdat[0];
        else if (req.addr[7:4] == 4'h1 && !grp[producer][0][0])
          grp[producer][req.addr[3:0]] <= req.wdat;
      end
      if (done && op_en) begin
        grp[consumer][0][0] <= 1'b0;
        done_ev[consumer]   <= 1'b1;
        consumer            <= ~consumer;
      end
    end
  end

endmodule
