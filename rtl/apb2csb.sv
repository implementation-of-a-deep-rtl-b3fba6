// apb2csb - bridge from an APB slave port to the accelerator's configuration
// space bus (CSB).
//
// The host reaches the register file over APB. An APB access phase
// (psel & penable) is turned into one CSB request: csb2nvdla_valid is held
// until csb2nvdla_ready. The CSB word address is the APB byte address
// divided by four (paddr[17:2]). Writes are sent as posted requests
// (csb2nvdla_nposted = 0), so the APB write completes in the cycle the CSB
// accepts it. Reads wait for nvdla2csb_valid and return its data in the
// same cycle as pready. pslverr is never raised.
//
// The port names of the CSB side follow the bridge's published pin list; the
// APB handshake details, posted writes and the address mapping are this
// design's choices. pclk is the same clock as the core's CSB clock, so no
// clock-domain crossing is needed.
module apb2csb
  import nvdla_pkg::*;
(
  input  logic              pclk,
  input  logic              prstn,
  // APB slave
  input  logic              psel,
  input  logic              penable,
  input  logic              pwrite,
  input  logic [31:0]       paddr,
  input  logic [31:0]       pwdata,
  output logic [31:0]       prdata,
  output logic              pready,
  output logic              pslverr,
  // CSB master
  output logic              csb2nvdla_valid,
  input  logic              csb2nvdla_ready,
  output logic [CSB_AW-1:0] csb2nvdla_addr,
  output logic [CSB_DW-1:0] csb2nvdla_wdat,
  output logic              csb2nvdla_write,
  output logic              csb2nvdla_nposted,
  input  logic              nvdla2csb_valid,
  input  logic [CSB_DW-1:0] nvdla2csb_data
);

  typedef enum logic {S_IDLE, S_WAIT_RD} state_e;
  state_e state;

  assign csb2nvdla_valid   = psel && penable && (state == S_IDLE);
  assign csb2nvdla_addr    = paddr[CSB_AW+1:2];
  assign csb2nvdla_wdat    = pwdata;
  assign csb2nvdla_write   = pwrite;
  assign csb2nvdla_nposted = 1'b0;

  assign pready  = (csb2nvdla_valid && csb2nvdla_ready && pwrite) ||
                   (state == S_WAIT_RD && nvdla2csb_valid);
  assign prdata  = nvdla2csb_data;
  assign pslverr = 1'b0;

  always_ff @(posedge pclk or negedge prstn) begin
    if (!prstn) state <= S_IDLE;
    else case (state)
      S_IDLE:    if (csb2nvdla_valid && csb2nvdla_ready && !pwrite) state <= S_WAIT_RD;
      S_WAIT_RD: if (nvdla2csb_valid) state <= S_IDLE;
      default:   state <= S_IDLE;
    endcase
  end

endmodule
