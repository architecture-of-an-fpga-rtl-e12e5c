// tb_loop_pipe_example -- checks the four-stage example datapath: with
// synchronous memories for A, B, D and a store log for E it runs n = 50 and
// n = 0, checks every stored E[i] = A[i] + B[i] - D[i], that iteration i is
// stored exactly 3 clocks after its A/B load (clock t_i + 3), that one
// iteration enters per clock, and that done follows the last store.
module tb_loop_pipe_example;
  localparam int W = 32, AW = 10;
  logic clk = 0, rst_n = 0, start = 0, busy, done, e_we;
  logic [AW:0] n;
  logic [AW-1:0] a_addr, b_addr, d_addr, e_addr;
  logic [W-1:0] a_rdata, b_rdata, d_rdata, e_wdata;
  logic [W-1:0] A [1 << AW], B [1 << AW], D [1 << AW];
  longint cyc = 0, load_cyc [int], store_cyc [int];
  int checks = 0, failures = 0, stores = 0;

  loop_pipe_example #(.W(W), .AW(AW)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    a_rdata <= A[a_addr];
    b_rdata <= B[b_addr];
    d_rdata <= D[d_addr];
    if (busy && !load_cyc.exists(int'(a_addr)) && dut.issue) load_cyc[int'(a_addr)] = cyc;
    if (e_we) begin
      stores++;
      store_cyc[int'(e_addr)] = cyc;
      checks++;
      if (e_wdata != A[e_addr] + B[e_addr] - D[e_addr]) begin
        failures++; $display("FAIL E[%0d]", e_addr);
      end
    end
  end

  task automatic run(input int count);
    int first_done;
    load_cyc.delete(); store_cyc.delete(); stores = 0;
    @(negedge clk) begin n = (AW+1)'(count); start = 1; end
    @(negedge clk) start = 0;
    while (!done) @(posedge clk);
    first_done = int'(cyc);
    checks++;
    if (stores != count) begin failures++; $display("FAIL stores %0d", stores); end
    for (int i = 0; i < count; i++) begin
      checks++;
      if (store_cyc[i] - load_cyc[i] != 3 || (i > 0 && load_cyc[i] - load_cyc[i-1] != 1)) begin
        failures++; $display("FAIL timing i=%0d", i);
      end
    end
    if (count > 0) begin
      checks++;
      if (first_done - store_cyc[count-1] > 1) begin failures++; $display("FAIL done late"); end
    end
    @(posedge clk);
  endtask

  initial begin
    foreach (A[i]) begin A[i] = $urandom; B[i] = $urandom; D[i] = $urandom; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(50);
    run(0);
    run(7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
