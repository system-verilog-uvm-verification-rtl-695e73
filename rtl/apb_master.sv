// apb_master: APB bridge from a simple system-bus slave port to an APB bus with
// NSLV peripheral selects.
//
// A system-bus request (valid/ready handshake) carries a write flag, an address and write
// data. The system address is {slave index, PADDR}: the upper SEL_W bits pick PSEL1..PSELn
// (index 0 -> PSEL1) and the lower ADDR_W bits go out on PADDR. On acceptance the bridge
// latches address, direction and write data and keeps them stable for the whole transfer.
// Only one PSEL is ever active.
//
// State machine (the three APB operating states):
//   IDLE   -> SETUP   when a request is accepted
//   SETUP  -> ACCESS  always, after one cycle (PSELx = 1, PENABLE = 0)
//   ACCESS -> ACCESS  while the selected slave holds PREADY low
//   ACCESS -> SETUP   on PREADY when another request is waiting (back-to-back transfer)
//   ACCESS -> IDLE    on PREADY when no request is waiting
// A transfer therefore takes two PCLK cycles with a zero-wait slave, and back-to-back
// transfers run at one per two cycles with no IDLE cycle between them.
//
// The response (rsp_valid for one cycle, rsp_rdata, rsp_err) is registered and appears the
// cycle after the ACCESS cycle that completed the transfer. An index with no slave behind
// it (index 3 of 3 slaves) selects nothing: the bridge still walks SETUP and ACCESS but
// raises neither PSEL nor PENABLE, and answers with rsp_err = 1 and zero read data.
//
// From the source description: the latching of the address, the one-hot decode to PSELx,
// the three states and their PSEL/PENABLE values, PREADY closing ACCESS, write data out,
// read data back to the system bus. Own choices: the system-bus handshake, the address
// split, the registered response and the unmapped-address error.
module apb_master #(
  parameter int unsigned ADDR_W = apb_pkg::APB_ADDR_W,
  parameter int unsigned DATA_W = apb_pkg::APB_DATA_W,
  parameter int unsigned NSLV   = apb_pkg::APB_NSLV,
  localparam int unsigned SEL_W = (NSLV > 1) ? $clog2(NSLV + 1) : 1,
  localparam int unsigned SYS_W = SEL_W + ADDR_W
) (
  input  logic              pclk,
  input  logic              presetn,
  // system-bus slave port
  input  logic              sys_req_valid,
  output logic              sys_req_ready,
  input  logic              sys_req_write,
  input  logic [SYS_W-1:0]  sys_req_addr,
  input  logic [DATA_W-1:0] sys_req_wdata,
  output logic              sys_rsp_valid,
  output logic [DATA_W-1:0] sys_rsp_rdata,
  output logic              sys_rsp_err,
  // APB master port
  output logic [NSLV-1:0]   psel,
  output logic              penable,
  output logic [ADDR_W-1:0] paddr,
  output logic              pwrite,
  output logic [DATA_W-1:0] pwdata,
  input  logic [DATA_W-1:0] prdata,
  input  logic              pready
);
  import apb_pkg::*;

  apb_state_e        state_q, state_d;
  logic [NSLV-1:0]   sel_q;
  logic [ADDR_W-1:0] addr_q;
  logic              write_q;
  logic [DATA_W-1:0] wdata_q;

  logic            mapped;
  logic            done;      // ACCESS cycle that completes the transfer
  logic            accept;
  logic [NSLV-1:0] sel_dec;

  // Address decoder: one-hot select from the index field.
  always_comb begin
    sel_dec = '0;
    for (int unsigned i = 0; i < NSLV; i++)
      if (sys_req_addr[SYS_W-1 -: SEL_W] == SEL_W'(i)) sel_dec[i] = 1'b1;
  end

  assign mapped      = |sel_q;
  assign done          = (state_q == APB_ACCESS) && (pready || !mapped);
  assign sys_req_ready = (state_q == APB_IDLE) || done;
  assign accept        = sys_req_valid && sys_req_ready;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      APB_IDLE:   if (accept) state_d = APB_SETUP;
      APB_SETUP:  state_d = APB_ACCESS;
      APB_ACCESS: if (done) state_d = accept ? APB_SETUP : APB_IDLE;
      default:    state_d = APB_IDLE;
    endcase
  end

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      state_q       <= APB_IDLE;
      sel_q         <= '0;
      addr_q        <= '0;
      write_q       <= 1'b0;
      wdata_q       <= '0;
      sys_rsp_valid <= 1'b0;
      sys_rsp_rdata <= '0;
      sys_rsp_err   <= 1'b0;
    end else begin
      state_q       <= state_d;
      sys_rsp_valid <= done;
      if (done) begin
        sys_rsp_rdata <= (!write_q && mapped) ? prdata : '0;
        sys_rsp_err   <= !mapped;
      end
      if (accept) begin
        sel_q   <= sel_dec;
        addr_q  <= sys_req_addr[ADDR_W-1:0];
        write_q <= sys_req_write;
        wdata_q <= sys_req_wdata;
      end
    end
  end

  assign psel    = (state_q == APB_IDLE) ? '0 : sel_q;
  assign penable = (state_q == APB_ACCESS) && mapped;
  assign paddr   = addr_q;
  assign pwrite  = write_q;
  assign pwdata  = wdata_q;

  // Bus rules.
  a_onehot_sel: assert property (@(posedge pclk) disable iff (!presetn) $onehot0(psel))
    else $error("apb_master: more than one PSEL active");
  a_enable_with_sel: assert property (@(posedge pclk) disable iff (!presetn)
    penable |-> $onehot(psel))
    else $error("apb_master: PENABLE without PSEL");
  a_setup_then_access: assert property (@(posedge pclk) disable iff (!presetn)
    (|psel && !penable) |=> (penable && $stable(psel)))
    else $error("apb_master: SETUP not followed by ACCESS");
  a_stable_in_access: assert property (@(posedge pclk) disable iff (!presetn)
    penable |-> ($stable(paddr) && $stable(pwrite) && $stable(pwdata) && $stable(psel)))
    else $error("apb_master: address, control or data changed in ACCESS");
  a_wait_holds: assert property (@(posedge pclk) disable iff (!presetn)
    (penable && !pready) |=> penable)
    else $error("apb_master: ACCESS left before PREADY");

endmodule
