# APB peripheral subsystem: bridge and memory-model slaves

Low-bandwidth peripherals (timers, UARTs, keypads, parallel I/O) do not need a pipelined
high-performance bus. The AMBA APB bus serves them: a single master, the bridge from the
system bus, runs every transfer in two phases, SETUP then ACCESS, with one select line per
peripheral and a shared address, write-data and strobe bundle. This RTL implements that
bridge, a read-data multiplexer and a peripheral modelled as a register memory, and wires
three such peripherals to the bridge's three selects. It is meant both as a small working
APB subsystem and as a reference design for testing an APB verification environment
against.

```
            system bus                      APB
 sys_req_* ----------> +------------+ PSEL1 --> +-----------+
 sys_rsp_* <---------- | apb_master | PSEL2 --> | apb_slave | x3 (256 x 32 bit each)
                       |  (bridge)  | PSEL3 --> +-----------+
                       |            | PENABLE, PADDR, PWRITE, PWDATA --> all slaves
                       |            | <-- PRDATA, PREADY -- apb_rdata_mux <-- each slave
                       +------------+
```

## The transfer

Every transfer, read or write, walks the three APB operating states:

| state  | PSELx | PENABLE | duration                                   |
|--------|-------|---------|--------------------------------------------|
| IDLE   | 0     | 0       | while nothing is requested                 |
| SETUP  | 1     | 0       | exactly one cycle                          |
| ACCESS | 1     | 1       | until the selected slave's PREADY is high  |

From ACCESS the bridge goes straight back to SETUP if another request is already waiting,
and to IDLE otherwise. PADDR, PWRITE, PWDATA and PSELx are latched when the request is
accepted and do not change until the transfer ends; they may change between one ACCESS
and the next SETUP.

A write followed back to back by a read, with the zero-wait slaves of this design, cycle
by cycle (a request is taken at the rising edge that ends a cycle in which both
`sys_req_valid` and `sys_req_ready` are high):

| cycle            | 0     | 1     | 2      | 3     | 4      | 5    |
|------------------|-------|-------|--------|-------|--------|------|
| state            | IDLE  | SETUP | ACCESS | SETUP | ACCESS | IDLE |
| `sys_req_valid`  | 1 (write) | 0 | 1 (read) | 0   | 0      | 0    |
| `sys_req_ready`  | 1     | 0     | 1      | 0     | 1      | 1    |
| PSELx            | 0     | 1     | 1      | 1     | 1      | 0    |
| PENABLE          | 0     | 0     | 1      | 0     | 1      | 0    |
| PWRITE           | -     | 1     | 1      | 0     | 0      | -    |
| PREADY (slave)   | 0     | 0     | 1      | 0     | 1      | 0    |
| PRDATA           | 0     | 0     | 0      | 0     | data   | 0    |
| `sys_rsp_valid`  | 0     | 0     | 0      | 1 (write) | 0  | 1 (read data) |

The second request is accepted at the edge that ends the first ACCESS cycle, so a stream
of requests runs at one transfer every two PCLK cycles. The response to a transfer appears
three cycles after the edge that accepted it (SETUP, ACCESS, response register) when the
slave adds no wait states, and one cycle later for every cycle PREADY is held low.

## Address map and the system-bus port

The bridge's system-side port is a plain valid/ready port (no AHB protocol):

| signal                | dir | meaning                                              |
|-----------------------|-----|------------------------------------------------------|
| `sys_req_valid/ready` | in/out | request handshake; taken at a rising edge with both high |
| `sys_req_write`       | in  | 1 = write                                            |
| `sys_req_addr[9:0]`   | in  | `{slave index[1:0], word address[7:0]}`              |
| `sys_req_wdata[31:0]` | in  | write data                                           |
| `sys_rsp_valid`       | out | one-cycle strobe per completed transfer              |
| `sys_rsp_rdata[31:0]` | out | read data; zero for writes and errors                |
| `sys_rsp_err`         | out | the index named no slave                             |

Index 0, 1 and 2 select PSEL1, PSEL2 and PSEL3; the word address goes out on PADDR
unchanged. Index 3 has no slave: the bridge still spends SETUP and ACCESS cycles on it but
raises no PSEL and no PENABLE, and answers with `sys_rsp_err = 1`. `sys_req_ready` is high
when the bridge is idle or in the ACCESS cycle that completes, so the requester must hold
its request until it sees ready.

## The memory slave (`apb_slave`)

Each slave holds 2^ADDR_W words of DATA_W bits (256 x 32). PADDR is a word index, not a
byte address. The slave:

* writes `mem[PADDR] <= PWDATA` at the edge that ends a write ACCESS
  (PSEL, PENABLE and PWRITE high);
* fetches `mem[PADDR]` at the edge that ends a read SETUP (PSEL high, PENABLE and PWRITE
  low) and drives it on PRDATA only during the read ACCESS cycle; PRDATA is zero at every
  other time, so the bus idles at zero;
* returns zero for a word that was never written since reset. A written-bit per word,
  cleared by PRESETn, does this; the memory array itself has no reset and maps to RAM;
* answers `PREADY = PSEL & PENABLE`, i.e. never inserts wait states.

It needs no idle cycle between transfers and works equally with PSEL held high across a
whole sequence and PENABLE toggling, which is how a single slave is often driven on its own
in a test bench.

## The read path (`apb_rdata_mux`)

The bridge has a single PRDATA/PREADY input. The multiplexer passes the selected slave's
pair through and, with no select active, gives zero data and PREADY high, so a transfer to
the unmapped index cannot stall the bridge.

## Parameters

| parameter | default | where                      | meaning                      |
|-----------|---------|----------------------------|------------------------------|
| `ADDR_W`  | 8       | all modules                | PADDR width, words per slave = 2^ADDR_W |
| `DATA_W`  | 32      | all modules                | PWDATA / PRDATA width        |
| `NSLV`    | 3       | `apb_master`, `apb_rdata_mux`, `apb_top` | number of PSEL lines / slaves |

The defaults live in `apb_pkg`, which also holds the state type. The slave-index field is
`$clog2(NSLV+1)` bits wide, so an unmapped index always exists. With a different NSLV the
system address width changes accordingly.

## Protocol assertions

`apb_master` carries concurrent assertions for the bus rules: at most one PSEL active;
PENABLE only with exactly one PSEL; SETUP is always followed by ACCESS with the same PSEL;
PADDR, PWRITE, PWDATA and PSEL stable during ACCESS; ACCESS not left while PREADY is low.
`apb_slave` checks that ACCESS is preceded by SETUP. They run in simulation with
`--assert` and are ignored by synthesis.

## Simulating

Each testbench is self-checking and ends with a line `TB_RESULT checks=N failures=M`.
With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/apb_pkg.sv rtl/apb_master.sv \
    rtl/apb_rdata_mux.sv rtl/apb_slave.sv rtl/apb_top.sv tb/tb_apb_top.sv \
    --top-module tb_apb_top
./obj_dir/Vtb_apb_top
```

The package must come first on the command line. Replace the testbench and top module to
run the others; a block's test needs only `apb_pkg.sv` and that block's file.

| testbench          | what it checks                                                        |
|--------------------|-----------------------------------------------------------------------|
| `tb_apb_slave`     | writes/reads of 00h, ABh, 10h, 30h with PSEL held high; unwritten words read zero; 2000 random transfers against a reference memory; PRDATA zero outside read ACCESS; writes while unselected ignored |
| `tb_apb_master`    | 3000 random transfers against a slave model that inserts 0-3 wait states and drives wrong data while not ready; cycle-exact SETUP/ACCESS/response timing; `sys_req_ready`; unmapped error; back-to-back and idle gaps |
| `tb_apb_rdata_mux` | every one-hot and the empty select with random slave outputs           |
| `tb_apb_top`       | the whole subsystem at default size: the 00h/ABh/10h/30h write-then-read sequence (AAAAEEEEh, FFFFEEEEh, FFFF1111h, 00001111h), reads of unwritten words, a 16-request back-to-back burst (checks two cycles per transfer), then 20000 random transfers to all three slaves and the unmapped index, each response checked for data, error flag and 3-cycle latency; counts SETUP->ACCESS, ACCESS->SETUP, ACCESS->IDLE, idle cycles, each PSEL, unmapped and unwritten reads, and fails if any never occurs |
| `tb_apb_slave_scoreboard` | one slave at default size in a class-based environment: a sequence of transactions feeds a driver (PSEL tied high), a monitor turns ACCESS cycles into transactions and a scoreboard with its own copy of the memory checks every read; runs the 00h/ABh/10h/30h sequence with random writes between, reads of unwritten words, then 500 random transfers, and checks two cycles per transfer. Needs `tb/apb_if.sv` as well |

All run in well under a second.

## How far to trust it, and where it is this design's own

Taken from the APB description this design follows: the three operating states and their
PSEL/PENABLE values; one-cycle SETUP; latched, stable address and control; one-hot decode
to PSEL1..PSEL3; the slave's write condition (PSEL, PENABLE, PWRITE) and read condition
(PSEL, PENABLE, PWRITE low); the slave modelled as memory; 8-bit addresses, 32-bit data;
PREADY high in ACCESS.

This design's own choices: the valid/ready system-bus port and registered response; the
address split and the error answer for index 3; PADDR carrying only the word address; the
bridge waiting on PREADY (the slaves here never make it wait, so ACCESS is always one
cycle in the assembled subsystem); zero-wait slaves with PREADY = PSEL & PENABLE; read data
fetched at the end of SETUP and forced to zero outside a read ACCESS; reset-to-zero
contents; asynchronous active-low reset throughout.

Not implemented: PSLVERR, PPROT and PSTRB (later APB revisions); the high-performance
system bus (AHB or ASB) and its masters, for which a protocol converter would drive the
`sys_req_*` port; real peripherals (UART, timer, keypad, PIO) in place of the memory
slaves.
