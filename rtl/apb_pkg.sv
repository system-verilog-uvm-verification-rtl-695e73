// apb_pkg: constants and types shared by the APB bridge, the memory slaves and the
// read-data multiplexer.
//
// The bus widths follow the simulated APB system: PADDR carries two hex digits (00h..FFh)
// and PWDATA/PRDATA carry 32-bit words such as AAAAEEEEh. Three peripheral selects
// (PSEL1..PSEL3) hang off the bridge. The operating states are the three APB states
// IDLE, SETUP and ACCESS (also called ENABLE).
package apb_pkg;

  parameter int unsigned APB_ADDR_W = 8;   // PADDR width (00h..FFh)
  parameter int unsigned APB_DATA_W = 32;  // PWDATA / PRDATA width
  parameter int unsigned APB_NSLV   = 3;   // PSEL1..PSEL3

  // Operating state of the APB bus, driven by the bridge.
  typedef enum logic [1:0] {
    APB_IDLE   = 2'd0,  // no transfer; PSELx = 0, PENABLE = 0
    APB_SETUP  = 2'd1,  // one cycle; PSELx = 1, PENABLE = 0
    APB_ACCESS = 2'd2   // PSELx = 1, PENABLE = 1 until PREADY
  } apb_state_e;

endpackage
