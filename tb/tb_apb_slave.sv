// tb_apb_slave: self-checking test of the APB memory slave.
//
// Drives the APB pins directly (inputs change on the falling edge) and keeps a reference
// copy of the registers. Phases: (1) the four-word write/read pattern 00h, ABh, 10h, 30h
// with PSEL held high throughout, (2) reads of registers never written (must be zero),
// (3) random transfers with PSEL released between some of them and with idle gaps.
// Every ACCESS cycle checks PREADY (high, no wait states) and, for reads, PRDATA; every
// non-ACCESS cycle checks that PRDATA is zero. A watchdog ends the run after 20000 cycles.
module tb_apb_slave;
  localparam int unsigned AW = 8;
  localparam int unsigned DW = 32;

  logic          pclk = 1'b0;
  logic          presetn;
  logic          psel, penable, pwrite;
  logic [AW-1:0] paddr;
  logic [DW-1:0] pwdata, prdata;
  logic          pready;

  int checks = 0, failures = 0;
  logic [DW-1:0] ref_mem [1<<AW];

  apb_slave #(.ADDR_W(AW), .DATA_W(DW)) dut (.*);

  always #5 pclk = ~pclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // One transfer: SETUP cycle then ACCESS cycle. keep_sel leaves PSEL high afterwards.
  task automatic xfer(input bit wr, input logic [AW-1:0] a, input logic [DW-1:0] d,
                      input bit keep_sel);
    @(negedge pclk);
    psel = 1'b1; penable = 1'b0; pwrite = wr; paddr = a; pwdata = d;
    #1 check(prdata == '0, "PRDATA zero in SETUP");
    @(negedge pclk);
    penable = 1'b1;
    #1 check(pready == 1'b1, "PREADY in ACCESS");
    if (!wr) check(prdata == ref_mem[a],
                   $sformatf("read %02h got %08h exp %08h", a, prdata, ref_mem[a]));
    else ref_mem[a] = d;
    @(negedge pclk);
    penable = 1'b0;
    if (!keep_sel) psel = 1'b0;
    #1 check(prdata == '0, "PRDATA zero after ACCESS");
  endtask

  localparam logic [AW-1:0] PA [4] = '{8'h00, 8'hAB, 8'h10, 8'h30};
  localparam logic [DW-1:0] PD [4] = '{32'hAAAAEEEE, 32'hFFFFEEEE, 32'hFFFF1111, 32'h00001111};

  initial begin
    foreach (ref_mem[i]) ref_mem[i] = '0;
    presetn = 1'b0; psel = 0; penable = 0; pwrite = 0; paddr = 0; pwdata = 0;
    repeat (3) @(negedge pclk);
    presetn = 1'b1;
    // (1) write then read the four words, PSEL tied high
    for (int i = 0; i < 4; i++) xfer(1'b1, PA[i], PD[i], 1'b1);
    for (int i = 0; i < 4; i++) xfer(1'b0, PA[i], 32'h0, 1'b1);
    // (2) unwritten registers read zero
    xfer(1'b0, 8'hDC, 32'h0, 1'b0);
    xfer(1'b0, 8'hA2, 32'h0, 1'b0);
    xfer(1'b0, 8'h38, 32'h0, 1'b0);
    // (3) random traffic
    for (int n = 0; n < 2000; n++) begin
      xfer(1'($urandom_range(0, 1)), AW'($urandom), $urandom, 1'($urandom_range(0, 1)));
      if ($urandom_range(0, 3) == 0) begin
        @(negedge pclk); psel = 1'b0;
        #1 check(prdata == '0 && pready == 1'b0, "idle bus");
      end
    end
    // write while unselected must not change anything
    @(negedge pclk);
    psel = 1'b0; penable = 1'b1; pwrite = 1'b1; paddr = 8'h00; pwdata = 32'h12345678;
    @(negedge pclk);
    penable = 1'b0;
    xfer(1'b0, 8'h00, 32'h0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge pclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
