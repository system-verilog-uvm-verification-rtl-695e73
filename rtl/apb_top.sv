// apb_top: an APB peripheral subsystem: one bridge (APB master), the read-data
// multiplexer and NSLV memory-model slaves on PSEL1..PSELn.
//
// The system-bus side of the bridge is brought out as the top's ports; this is where a
// high-performance system bus (and its processor, DMA and memories) would attach. The
// shared APB signals are brought out as read-only monitor outputs so that the bus can be
// observed, as in the waveforms of a bus test.
//
// System address = {slave index, word address}: index 0..NSLV-1 selects slave 1..NSLV,
// the word address picks one of 2**ADDR_W 32-bit registers in that slave. A transfer takes
// two cycles on APB (SETUP, ACCESS) and its response appears one cycle later.
module apb_top #(
  parameter int unsigned ADDR_W = apb_pkg::APB_ADDR_W,
  parameter int unsigned DATA_W = apb_pkg::APB_DATA_W,
  parameter int unsigned NSLV   = apb_pkg::APB_NSLV,
  localparam int unsigned SEL_W = (NSLV > 1) ? $clog2(NSLV + 1) : 1,
  localparam int unsigned SYS_W = SEL_W + ADDR_W
) (
  input  logic              pclk,
  input  logic              presetn,
  // system-bus port
  input  logic              sys_req_valid,
  output logic              sys_req_ready,
  input  logic              sys_req_write,
  input  logic [SYS_W-1:0]  sys_req_addr,
  input  logic [DATA_W-1:0] sys_req_wdata,
  output logic              sys_rsp_valid,
  output logic [DATA_W-1:0] sys_rsp_rdata,
  output logic              sys_rsp_err,
  // APB bus monitor
  output logic [NSLV-1:0]   mon_psel,
  output logic              mon_penable,
  output logic [ADDR_W-1:0] mon_paddr,
  output logic              mon_pwrite,
  output logic [DATA_W-1:0] mon_pwdata,
  output logic [DATA_W-1:0] mon_prdata,
  output logic              mon_pready
);

  logic [NSLV-1:0]             psel;
  logic                        penable;
  logic [ADDR_W-1:0]           paddr;
  logic                        pwrite;
  logic [DATA_W-1:0]           pwdata;
  logic [DATA_W-1:0]           prdata;
  logic                        pready;
  logic [NSLV-1:0][DATA_W-1:0] slv_prdata;
  logic [NSLV-1:0]             slv_pready;

  apb_master #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .NSLV(NSLV)) u_master (
    .pclk, .presetn,
    .sys_req_valid, .sys_req_ready, .sys_req_write, .sys_req_addr, .sys_req_wdata,
    .sys_rsp_valid, .sys_rsp_rdata, .sys_rsp_err,
    .psel, .penable, .paddr, .pwrite, .pwdata, .prdata, .pready
  );

  apb_rdata_mux #(.DATA_W(DATA_W), .NSLV(NSLV)) u_mux (
    .psel, .slv_prdata, .slv_pready, .prdata, .pready
  );

  for (genvar i = 0; i < NSLV; i++) begin : g_slv
    apb_slave #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_slave (
      .pclk, .presetn,
      .psel   (psel[i]),
      .penable,
      .paddr,
      .pwrite,
      .pwdata,
      .prdata (slv_prdata[i]),
      .pready (slv_pready[i])
    );
  end

  assign mon_psel    = psel;
  assign mon_penable = penable;
  assign mon_paddr   = paddr;
  assign mon_pwrite  = pwrite;
  assign mon_pwdata  = pwdata;
  assign mon_prdata  = prdata;
  assign mon_pready  = pready;

endmodule
