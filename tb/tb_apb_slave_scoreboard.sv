// tb_apb_slave_scoreboard: a class-based, scoreboard-checked run of one APB memory slave
// at its default size (256 x 32), in the layered style of a verification environment:
//
//   sequence -> mailbox -> driver -> slave pins -> monitor -> mailbox -> scoreboard
//
// The driver keeps PSEL tied high and marks each transfer by a SETUP cycle (PENABLE low)
// followed by an ACCESS cycle (PENABLE high). The monitor turns every ACCESS cycle with
// PREADY high into a transaction. The scoreboard keeps its own copy of the slave memory:
// writes update it, reads are compared with it (words never written read zero).
//
// The directed sequence writes AAAAEEEEh, FFFFEEEEh, FFFF1111h, 00001111h to 00h, ABh, 10h
// and 30h, mixed with writes of random data to other addresses, then reads the four words
// back and reads a few words never written. A random sequence of 500 reads and writes
// follows. The run also checks that each transfer takes exactly two cycles and prints how
// many messages the driver, monitor and scoreboard issued.
module tb_apb_slave_scoreboard;
  localparam int unsigned AW = 8;
  localparam int unsigned DW = 32;

  logic pclk = 1'b0;
  always #5 pclk = ~pclk;

  apb_if #(.ADDR_W(AW), .DATA_W(DW)) bus (.pclk);

  apb_slave dut (
    .pclk    (pclk),
    .presetn (bus.presetn),
    .psel    (bus.psel),
    .penable (bus.penable),
    .paddr   (bus.paddr),
    .pwrite  (bus.pwrite),
    .pwdata  (bus.pwdata),
    .prdata  (bus.prdata),
    .pready  (bus.pready)
  );

  int checks = 0, failures = 0;

  class apb_item;
    bit            write;
    logic [AW-1:0] addr;
    logic [DW-1:0] data;
    longint        cycle;
    function new(bit w = 0, logic [AW-1:0] a = '0, logic [DW-1:0] d = '0);
      write = w; addr = a; data = d;
    endfunction
  endclass

  typedef mailbox #(apb_item) item_mbx_t;

  longint cycle = 0;
  always @(posedge pclk) cycle++;

  class apb_driver;
    virtual apb_if #(.ADDR_W(AW), .DATA_W(DW)) vif;
    item_mbx_t in_q;
    int        n_msgs = 0;
    function new(virtual apb_if #(.ADDR_W(AW), .DATA_W(DW)) v, item_mbx_t q);
      vif = v; in_q = q;
    endfunction
    task run(int n);
      apb_item it;
      for (int i = 0; i < n; i++) begin
        in_q.get(it);
        @(negedge vif.pclk);
        vif.psel    = 1'b1;
        vif.penable = 1'b0;
        vif.pwrite  = it.write;
        vif.paddr   = it.addr;
        vif.pwdata  = it.write ? it.data : DW'($urandom);
        @(negedge vif.pclk);
        vif.penable = 1'b1;
        n_msgs++;
      end
      @(negedge vif.pclk);
      vif.penable = 1'b0;
    endtask
  endclass

  class apb_monitor;
    virtual apb_if #(.ADDR_W(AW), .DATA_W(DW)) vif;
    item_mbx_t out_q;
    int        n_msgs = 0;
    function new(virtual apb_if #(.ADDR_W(AW), .DATA_W(DW)) v, item_mbx_t q);
      vif = v; out_q = q;
    endfunction
    task run();
      forever begin
        @(negedge vif.pclk);
        #1;
        if (vif.psel && vif.penable && vif.pready) begin
          apb_item it;
          it = new(vif.pwrite, vif.paddr, vif.pwrite ? vif.pwdata : vif.prdata);
          it.cycle = cycle;
          out_q.put(it);
          n_msgs++;
        end
      end
    endtask
  endclass

  class apb_scoreboard;
    item_mbx_t     in_q;
    logic [DW-1:0] mem [1<<AW];
    int            n_msgs = 0;
    longint        last_cycle = -1;
    int            n_rate_ok = 0, n_rate = 0;
    function new(item_mbx_t q);
      in_q = q;
      foreach (mem[i]) mem[i] = '0;
    endfunction
    task run();
      apb_item it;
      forever begin
        in_q.get(it);
        if (last_cycle >= 0) begin
          n_rate++;
          if (it.cycle - last_cycle == 2) n_rate_ok++;
        end
        last_cycle = it.cycle;
        if (it.write) mem[it.addr] = it.data;
        else begin
          checks++;
          n_msgs++;
          if (it.data !== mem[it.addr]) begin
            failures++;
            $display("SCBD read mismatch: address %02h local memory %08h prdata %08h",
                     it.addr, mem[it.addr], it.data);
          end else if (n_msgs <= 8) begin
            $display("SCBD read match: address %02h local memory %08h prdata %08h",
                     it.addr, mem[it.addr], it.data);
          end
        end
      end
    endtask
  endclass

  item_mbx_t     seq_q = new();
  item_mbx_t     mon_q = new();
  apb_driver     drv;
  apb_monitor    mon;
  apb_scoreboard scb;

  localparam logic [AW-1:0] PA [4] = '{8'h00, 8'hAB, 8'h10, 8'h30};
  localparam logic [DW-1:0] PD [4] = '{32'hAAAAEEEE, 32'hFFFFEEEE, 32'hFFFF1111, 32'h00001111};
  localparam int unsigned NRAND = 500;

  initial begin
    apb_item it;
    int      n;
    logic [AW-1:0] a;
    n = 0;
    drv = new(bus, seq_q);
    mon = new(bus, mon_q);
    scb = new(mon_q);
    bus.presetn = 1'b0; bus.psel = 1'b0; bus.penable = 1'b0; bus.pwrite = 1'b0;
    bus.paddr = '0; bus.pwdata = '0;
    repeat (3) @(negedge pclk);
    bus.presetn = 1'b1;
    // directed sequence: four known words, each followed by a random write elsewhere
    for (int i = 0; i < 4; i++) begin
      it = new(1'b1, PA[i], PD[i]); seq_q.put(it); n++;
      do a = AW'($urandom); while (a inside {PA[0], PA[1], PA[2], PA[3]});
      it = new(1'b1, a, $urandom); seq_q.put(it); n++;
    end
    for (int i = 0; i < 4; i++) begin
      it = new(1'b0, PA[i]); seq_q.put(it); n++;
    end
    it = new(1'b0, 8'hDC); seq_q.put(it); n++;
    it = new(1'b0, 8'hA2); seq_q.put(it); n++;
    it = new(1'b0, 8'h38); seq_q.put(it); n++;
    // random sequence
    for (int i = 0; i < NRAND; i++) begin
      it = new(1'($urandom_range(0, 1)), AW'($urandom), $urandom); seq_q.put(it); n++;
    end
    fork
      mon.run();
      scb.run();
    join_none
    drv.run(n);
    repeat (3) @(negedge pclk);
    $display("messages: DRV %0d  MON %0d  SCBD %0d", drv.n_msgs, mon.n_msgs, scb.n_msgs);
    checks++;
    if (mon.n_msgs != n || drv.n_msgs != n) begin
      failures++;
      $display("FAIL monitor saw %0d of %0d transfers", mon.n_msgs, n);
    end
    checks++;
    if (scb.n_rate_ok != n - 1) begin
      failures++;
      $display("FAIL %0d of %0d transfers took two cycles", scb.n_rate_ok, scb.n_rate);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge pclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
