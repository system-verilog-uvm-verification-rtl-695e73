// apb_if: the signal bundle of one APB slave port, used by the class-based test
// environment to reach the pins through a virtual interface. The clocking-free style keeps
// it simple: the driver changes signals on the falling edge of PCLK and the monitor samples
// them on the falling edge, half a cycle away from the rising edge the slave acts on.
interface apb_if #(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = 32
) (
  input logic pclk
);
  logic              presetn;
  logic              psel;
  logic              penable;
  logic [ADDR_W-1:0] paddr;
  logic              pwrite;
  logic [DATA_W-1:0] pwdata;
  logic [DATA_W-1:0] prdata;
  logic              pready;
endinterface
