// nvdla_cdma - convolution DMA: copies one layer's feature data and weights
// from external memory into the convolution buffer.
//
// On start it reads in_w*in_h*cg feature atoms from src_addr into buffer
// entries 0, 1, ... and then kg*kh*kw*cg*ATOMIC_K weight atoms from wt_addr
// into the entries starting at the first weight bank (wt_bank * depth).
// It issues one 8-byte read request per cycle whenever the memory interface
// accepts it, with as many reads in flight as the interface allows, and
// writes each returning word into the buffer in the cycle it arrives
// (responses of one client return in request order). done pulses for one
// cycle after the last word is written.
//
// Image input (cfg.img, with cg = 1): the input is an 8-bit image of 4-byte
// pixels (for example R, G, B and a pad byte, or Y, U, V and a pad byte),
// two pixels per 64-bit word. Each pixel becomes one feature atom with
// channels 0..3 from the pixel's bytes and channels 4..7 zero. The word
// holding a pixel is read once per pixel and the pixel's half is kept, so
// there is still one buffer write per response; image loads take one read
// per pixel, as feature loads take one read per atom.
//
// Fetching weights and feature data into the buffer through two kinds of
// reads, and accepting 8-bit RGB/YUV image input, are the described
// function; the single read client, the order, the memory layout and the
// image pixel format are this design's choices.
module nvdla_cdma
  import nvdla_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  conv_cfg_t          cfg,
  output logic               done,
  // memory read client
  output logic               rd_req_valid,
  input  logic               rd_req_ready,
  output addr_t              rd_req_addr,
  input  logic               rd_resp_valid,
  input  logic [MEMIF_DW-1:0] rd_resp_data,
  // convolution buffer write port
  output logic               cbuf_wr_en,
  output logic [CBUF_AW-1:0] cbuf_wr_addr,
  output atom_t              cbuf_wr_data
);

  logic        busy;
  logic [31:0] n_dat, n_tot, ri, wi;

  always_comb begin
    n_dat = 32'(cfg.in_w) * 32'(cfg.in_h) * 32'(cfg.cg);
    n_tot = n_dat + 32'(cfg.kg) * 32'(cfg.kh) * 32'(cfg.kw) * 32'(cfg.cg) * ATOMIC_K;
  end

  assign rd_req_valid = busy && (ri < n_tot);
  // in image mode feature read ri fetches the word holding pixel ri
  assign rd_req_addr  = (ri < n_dat) ? cfg.src_addr + ((cfg.img ? (ri >> 1) : ri) << 3)
                                     : cfg.wt_addr + ((ri - n_dat) << 3);

  assign cbuf_wr_en   = busy && rd_resp_valid;
  always_comb begin
    cbuf_wr_data = rd_resp_data;
    if (cfg.img && wi < n_dat)
      cbuf_wr_data = atom_t'({32'd0, wi[0] ? rd_resp_data[63:32] : rd_resp_data[31:0]});
  end
  assign cbuf_wr_addr = (wi < n_dat) ? wi[CBUF_AW-1:0]
                        : CBUF_AW'({cfg.wt_bank, 9'd0}) + CBUF_AW'(wi - n_dat);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      ri   <= '0;
      wi   <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          ri   <= '0;
          wi   <= '0;
        end
      end else begin
        if (rd_req_valid && rd_req_ready) ri <= ri + 32'd1;
        if (rd_resp_valid) wi <= wi + 32'd1;
        if (wi == n_tot) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  a_data_fits: assert property (@(posedge clk) disable iff (!rst_n)
      cbuf_wr_en && wi < n_dat |-> wi < 32'({cfg.wt_bank, 9'd0}));

endmodule
