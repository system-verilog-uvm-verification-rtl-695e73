// apb_rdata_mux: returns the selected slave's read data and ready to the bridge.
//
// Combinational. With PSELx high, PRDATA and PREADY of slave x are passed on. With no
// select active the bus reads zero and PREADY is high, so an unselected bus never stalls
// the bridge. The bridge raises at most one PSEL; should several be high, the slaves'
// outputs are ORed (each slave drives zero when it is not being read).
//
// The source shows a single PRDATA input on the bridge and one PRDATA output per slave;
// how they are combined is this design's own choice.
module apb_rdata_mux #(
  parameter int unsigned DATA_W = apb_pkg::APB_DATA_W,
  parameter int unsigned NSLV   = apb_pkg::APB_NSLV
) (
  input  logic [NSLV-1:0]             psel,
  input  logic [NSLV-1:0][DATA_W-1:0] slv_prdata,
  input  logic [NSLV-1:0]             slv_pready,
  output logic [DATA_W-1:0]           prdata,
  output logic                        pready
);

  always_comb begin
    prdata = '0;
    pready = ~|psel;
    for (int unsigned i = 0; i < NSLV; i++) begin
      if (psel[i]) begin
        prdata = prdata | slv_prdata[i];
        pready = pready | slv_pready[i];
      end
    end
  end

endmodule
