// nvdla_pdp - planar data processor: pooling of a feature cube, memory to
// memory.
//
// For every output atom (pixel oy, ox and channel group cg, in [y][x][cg]
// order) PDP reads the kw x kh window of input atoms starting at input pixel
// (oy*sy, ox*sx) and reduces it lane by lane: maximum, minimum or average.
// The average is the window sum times recip (recip = round(65536/(kw*kh)),
// programmed by the host) rounded and shifted right by 16. All reads of a
// window are issued back to back (one per accepted cycle) and the results
// are folded in as they return; then the output atom is written. After
// start, done pulses once all write responses have come back.
//
// Max, min and average pooling over a sliding window are the described
// function; the window-at-a-time schedule, the reciprocal multiply and the
// register fields are this design's choices. There is no padding.
module nvdla_pdp
  import nvdla_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  pdp_cfg_t            cfg,
  output logic                done,
  output logic                rd_req_valid,
  input  logic                rd_req_ready,
  output addr_t               rd_req_addr,
  input  logic                rd_resp_valid,
  input  logic [MEMIF_DW-1:0] rd_resp_data,
  output logic                wr_req_valid,
  input  logic                wr_req_ready,
  output addr_t               wr_req_addr,
  output logic [MEMIF_DW-1:0] wr_req_data,
  input  logic                wr_ack
);

  typedef enum logic [1:0] {S_IDLE, S_RD, S_WR, S_FLUSH} state_e;
  state_e state;

  logic [15:0] ox, oy;
  logic [7:0]  cgi, kx, ky;
  logic [15:0] nrd, nresp;              // reads issued / returned in window
  logic [31:0] o, total, acks;
  logic signed [31:0] acc [ATOMIC_C];
  logic [15:0] win;

  assign win   = 16'(cfg.kw) * 16'(cfg.kh);
  assign total = 32'(cfg.out_w) * 32'(cfg.out_h) * 32'(cfg.cg);

  logic [31:0] iy, ix;
  always_comb begin
    iy = 32'(oy) * 32'(cfg.sy) + 32'(ky);
    ix = 32'(ox) * 32'(cfg.sx) + 32'(kx);
  end

  assign rd_req_valid = (state == S_RD) && (nrd < win);
  assign rd_req_addr  = cfg.src_addr
                        + (((iy * 32'(cfg.in_w) + ix) * 32'(cfg.cg) + 32'(cgi)) << 3);
  assign wr_req_valid = (state == S_WR);
  assign wr_req_addr  = cfg.dst_addr + (o << 3);

  // fold one returning atom into the window accumulators
  atom_t in;
  assign in = rd_resp_data;
  logic signed [31:0] acc_n [ATOMIC_C];
  always_comb begin
    for (int c = 0; c < ATOMIC_C; c++) begin
      logic signed [31:0] x;
      x = 32'(signed'(in[c]));
      if (nresp == 16'd0)             acc_n[c] = x;
      else case (cfg.mode)
        POOL_MAX: acc_n[c] = (x > acc[c]) ? x : acc[c];
        POOL_MIN: acc_n[c] = (x < acc[c]) ? x : acc[c];
        default:  acc_n[c] = acc[c] + x;
      endcase
    end
  end

  // result of a complete window
  always_comb begin
    for (int c = 0; c < ATOMIC_C; c++) begin
      if (cfg.mode == POOL_AVG)
        wr_req_data[c*8 +: 8] = sat8((64'(acc[c]) * signed'(64'(cfg.recip)) + 64'sd32768) >>> 16);
      else
        wr_req_data[c*8 +: 8] = acc[c][7:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      {ox, oy} <= '0;
      {cgi, kx, ky} <= '0;
      {nrd, nresp} <= '0;
      o    <= '0;
      acks <= '0;
      acc  <= '{default: '0};
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (wr_ack) acks <= acks + 32'd1;
      case (state)
        S_IDLE: if (start) begin
          state <= S_RD;
          {ox, oy} <= '0;
          {cgi, kx, ky} <= '0;
          {nrd, nresp} <= '0;
          o    <= '0;
          acks <= '0;
        end
        S_RD: begin
          if (rd_req_valid && rd_req_ready) begin
            nrd <= nrd + 16'd1;
            if (kx == cfg.kw - 8'd1) begin
              kx <= '0;
              ky <= ky + 8'd1;
            end else kx <= kx + 8'd1;
          end
          if (rd_resp_valid) begin
            acc   <= acc_n;
            nresp <= nresp + 16'd1;
          end
          if (nresp == win) state <= S_WR;
        end
        S_WR: if (wr_req_ready) begin
          {nrd, nresp} <= '0;
          {kx, ky} <= '0;
          o <= o + 32'd1;
          if (o == total - 32'd1) state <= S_FLUSH;
          else begin
            state <= S_RD;
            if (cgi != cfg.cg - 8'd1) cgi <= cgi + 8'd1;
            else begin
              cgi <= '0;
              if (ox != cfg.out_w - 16'd1) ox <= ox + 16'd1;
              else begin
                ox <= '0;
                oy <= oy + 16'd1;
              end
            end
          end
        end
        S_FLUSH: if (acks == total) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
