// apb_slave: an APB peripheral modelled as a word-addressed register memory.
//
// Each PADDR value names one DATA_W-bit register, so DEPTH = 2**ADDR_W registers
// (256 x 32 bits by default). A write updates register PADDR when PSEL, PENABLE and
// PWRITE are all high, i.e. at the end of the ACCESS cycle. For a read the register is
// fetched at the end of the SETUP cycle (PSEL high, PENABLE low, PWRITE low) and PRDATA
// drives it only while PSEL and PENABLE are both high with PWRITE low; at all other
// times PRDATA is zero. A register never written since reset reads as zero: a
// per-register valid bit, cleared by PRESETn, stands in for clearing the whole array.
//
// The slave never stretches a transfer: PREADY = PSEL & PENABLE, so ACCESS lasts one
// cycle. It does not rely on PSEL going low between transfers, so it also works with
// PSEL held high and PENABLE toggling, as in a single-slave test bench.
//
// From the source description: the memory model, the write condition, the read condition
// and PRDATA valid during ACCESS. Own choices: the register count, the read fetched in
// SETUP, zero outside ACCESS, reset-to-zero contents, and zero wait states.
module apb_slave #(
  parameter int unsigned ADDR_W = apb_pkg::APB_ADDR_W,
  parameter int unsigned DATA_W = apb_pkg::APB_DATA_W
) (
  input  logic              pclk,
  input  logic              presetn,
  input  logic              psel,
  input  logic              penable,
  input  logic [ADDR_W-1:0] paddr,
  input  logic              pwrite,
  input  logic [DATA_W-1:0] pwdata,
  output logic [DATA_W-1:0] prdata,
  output logic              pready
);

  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [DATA_W-1:0] mem [DEPTH];
  logic [DEPTH-1:0]  written_q;
  logic [DATA_W-1:0] rdata_q;

  logic wr_en, rd_fetch, rd_drive;
  assign wr_en    = psel &  penable &  pwrite;
  assign rd_fetch = psel & ~penable & ~pwrite;
  assign rd_drive = psel &  penable & ~pwrite;

  always_ff @(posedge pclk) begin
    if (wr_en) mem[paddr] <= pwdata;
  end

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      written_q <= '0;
      rdata_q   <= '0;
    end else begin
      if (wr_en) written_q[paddr] <= 1'b1;
      if (rd_fetch) rdata_q <= written_q[paddr] ? mem[paddr] : '0;
    end
  end

  assign prdata = rd_drive ? rdata_q : '0;
  assign pready = psel & penable;

  // A slave sees PENABLE only together with its PSEL.
  a_enable_needs_sel: assert property (@(posedge pclk) disable iff (!presetn)
    (penable & psel) |-> $past(psel))
    else $error("apb_slave: ACCESS without a preceding SETUP");

endmodule
