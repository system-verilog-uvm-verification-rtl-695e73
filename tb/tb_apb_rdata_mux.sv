// tb_apb_rdata_mux: self-checking test of the read-data multiplexer.
//
// Applies every one-hot and the all-zero select pattern with random slave outputs, and
// compares PRDATA/PREADY with the selected slave's values (zero and ready when nothing is
// selected). Purely combinational; a watchdog bounds the run.
module tb_apb_rdata_mux;
  localparam int unsigned DW = 32;
  localparam int unsigned N  = 3;

  logic [N-1:0]         psel;
  logic [N-1:0][DW-1:0] slv_prdata;
  logic [N-1:0]         slv_pready;
  logic [DW-1:0]        prdata;
  logic                 pready;

  int checks = 0, failures = 0;

  apb_rdata_mux #(.DATA_W(DW), .NSLV(N)) dut (.*);

  initial begin
    for (int n = 0; n < 400; n++) begin
      int s;
      s = $urandom_range(0, N);  // N means no select
      psel = (s == N) ? '0 : N'(1 << s);
      for (int i = 0; i < N; i++) begin
        slv_prdata[i] = $urandom;
        slv_pready[i] = 1'($urandom_range(0, 1));
      end
      #1;
      checks++;
      if (s == N) begin
        if (prdata !== '0 || pready !== 1'b1) begin
          failures++;
          $display("FAIL idle: prdata=%08h pready=%b", prdata, pready);
        end
      end else if (prdata !== slv_prdata[s] || pready !== slv_pready[s]) begin
        failures++;
        $display("FAIL sel %0d: prdata=%08h exp %08h pready=%b exp %b",
                 s, prdata, slv_prdata[s], pready, slv_pready[s]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
