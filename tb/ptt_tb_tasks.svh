// ptt_tb_tasks.svh: AXI4-Lite master tasks and check helpers shared by the
// packet_train_tester testbenches. Included inside a testbench module that
// declares clk, checks, failures and the s_axil_* signals of the tester.

task automatic check(input bit ok, input string msg);
  checks++;
  if (!ok) begin failures++; $display("FAIL: %s", msg); end
endtask

task automatic axil_write(input logic [7:0] a, input logic [31:0] d);
  bit aw_done, w_done;
  @(negedge clk);
  awaddr = a; awvalid = 1; wdata = d; wstrb = 4'hF; wvalid = 1; bready = 1;
  aw_done = 0; w_done = 0;
  while (!(aw_done && w_done)) begin
    @(posedge clk);
    if (awvalid && awready) aw_done = 1;
    if (wvalid && wready)   w_done = 1;
    @(negedge clk);
    if (aw_done) awvalid = 0;
    if (w_done)  wvalid = 0;
  end
  while (!bvalid) @(negedge clk);
  @(negedge clk) bready = 0;
endtask

task automatic axil_read(input logic [7:0] a, output logic [31:0] d);
  @(negedge clk) araddr = a; arvalid = 1; rready = 1;
  @(posedge clk iff arready);
  @(negedge clk) arvalid = 0;
  while (!rvalid) @(negedge clk);
  d = rdata;
  @(negedge clk) rready = 0;
endtask

task automatic axil_read64(input logic [7:0] a_hi, output logic [63:0] d);
  logic [31:0] hi, lo;
  axil_read(a_hi, hi);
  axil_read(a_hi + 8'h4, lo);
  d = {hi, lo};
endtask

// Program a train, arm the calculator, start the generator
task automatic start_train(input int size, input int n);
  axil_write(8'h24, 32'(size));
  axil_write(8'h28, 32'(n));
  axil_write(8'h00, 32'h2);   // arm
  axil_write(8'h00, 32'h1);   // start
endtask

// Wait for the results-valid status bit, with a limit in clocks
task automatic wait_results(input int limit, output bit ok);
  logic [31:0] st;
  int waited;
  ok = 0; waited = 0;
  while (waited < limit) begin
    repeat (200) @(posedge clk);
    waited += 200;
    axil_read(8'h04, st);
    if (st[2]) begin ok = 1; break; end
  end
endtask
