// zpc_main_model: behavioural main device of the Zero Power Communication bus,
// for testbenches (the microcontroller side of the bus).
//
// It drives the push-pull clock and can pull the data line low; the line itself
// (pulled up by the main device, wired-AND with the sensor's pull-down) is
// resolved by the testbench and returned on `line`. One bit is one clock
// period: the clock falls, the main device sets its pull-down, half a period
// later the clock rises and the line is sampled. The clock only runs while a
// task is sending. Tasks build messages in the bus format used by zpc_block:
// runs of control bits closed by a high bit, then address fields and payload,
// most significant bit first.
`timescale 1ns/1ps
module zpc_main_model #(
  parameter real HALF_NS = 10000.0   // 50 kHz bus clock
) (
  output logic zpc_clk,
  output logic pd,
  input  logic line
);

  int unsigned clocks = 0;        // rising edges produced so far
  real         half_ns = HALF_NS; // may be changed between messages (bus speed)

  initial begin
    zpc_clk = 1'b0;
    pd      = 1'b0;
  end

  // One bit period; pull = 1 pulls the line low. Returns the sampled line.
  task automatic bit_cycle(input logic pull, output logic sampled);
    zpc_clk = 1'b0;
    pd      = pull;
    #(half_ns);
    zpc_clk = 1'b1;
    clocks++;
    #1 sampled = line;
    #(half_ns - 1.0);
    zpc_clk = 1'b0;
  endtask

  task automatic ctrl_run(input int n);
    logic s;
    repeat (n) bit_cycle(1'b1, s);
    bit_cycle(1'b0, s);            // separator
  endtask

  task automatic idle(input int n);
    logic s;
    repeat (n) bit_cycle(1'b0, s);
  endtask

  task automatic send(input logic [31:0] v, input int n);
    logic s;
    for (int i = n - 1; i >= 0; i--) bit_cycle(~v[i], s);
  endtask

  // Receive n bits; the main device pulls bit `jam` low itself (-1: none).
  task automatic recv(output logic [31:0] v, input int n, input int jam = -1);
    logic s;
    v = '0;
    for (int i = n - 1; i >= 0; i--) begin
      bit_cycle(i == jam, s);
      v[i] = s;
    end
  endtask

  // Non-addressing read: a run of np control bits, then the mode bit (high).
  task automatic read_na(input int np, input int n, output logic [31:0] v, input int jam = -1);
    ctrl_run(np);
    idle(1);
    recv(v, n, jam);
    pd = 1'b0;
  endtask

  // Addressing-mode header; nr = 0 sends an empty register run.
  task automatic header(input int np, input int nd, input int nr);
    logic s;
    ctrl_run(np);
    ctrl_run(nd);
    if (nr == 0) bit_cycle(1'b0, s);
    else         ctrl_run(nr);
  endtask

  task automatic read_a(input int np, input int nd, input int nr,
                        input logic [31:0] dev, input int dl,
                        input logic [31:0] rega, input int rl,
                        input int n, output logic [31:0] v);
    header(np, nd, nr);
    send(dev, dl);
    send(rega, rl);
    recv(v, n);
    pd = 1'b0;
  endtask

  task automatic write_a(input int np, input int nd, input int nr,
                         input logic [31:0] dev, input int dl,
                         input logic [31:0] rega, input int rl,
                         input logic [31:0] data, input int n);
    header(np, nd, nr);
    send(dev, dl);
    send(rega, rl);
    send(data, n);
    pd = 1'b0;
  endtask

endmodule
