// nvdla_cfgrom - read-only registers that describe how this core was
// configured, so that driver software can discover it.
//
// Word offsets: 0x00 Atomic-C, 0x01 Atomic-K, 0x02 convolution buffer banks,
// 0x03 bank width (bytes), 0x04 bank depth, 0x05 memory interface width
// (bits), 0x06 memory address width, 0x07 read clients, 0x08 write clients,
// 0x09 outstanding reads, 0x0A feature flags (bit 0 SDP bias, bit 1 SDP
// batch-norm scaling, bit 2 PDP, bit 3 CDP, bit 4 Winograd, bit 5 weight
// compression, bit 6 secondary memory, bit 7 bridge DMA, bit 8 Rubik).
// Other offsets read 0. The read is combinational; writes are ignored.
//
// The values are the small configuration's specification; the offsets and
// the flag encoding are this design's.
module nvdla_cfgrom
  import nvdla_pkg::*;
(
  input  reg_req_t    req,
  output logic [31:0] rdata
);

  localparam logic [31:0] FEATURES = 32'b0_0000_1111;

  always_comb begin
    case (req.addr)
      8'h00:   rdata = ATOMIC_C;
      8'h01:   rdata = ATOMIC_K;
      8'h02:   rdata = CBUF_BANK_NUM;
      8'h03:   rdata = CBUF_BANK_WIDTH;
      8'h04:   rdata = CBUF_BANK_DEPTH;
      8'h05:   rdata = MEMIF_DW;
      8'h06:   rdata = MEM_AW;
      8'h07:   rdata = NUM_RD;
      8'h08:   rdata = NUM_WR;
      8'h09:   rdata = MEMIF_LATENCY;
      8'h0A:   rdata = FEATURES;
      default: rdata = '0;
    endcase
  end

endmodule
