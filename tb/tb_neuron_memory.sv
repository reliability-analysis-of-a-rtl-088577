// Self-checking testbench for neuron_memory: random writes and reads on the
// combinational read / synchronous write ports against a model array,
// including read-modify-write of one address per clock.
module tb_neuron_memory;
  localparam int N = 784, PW = 16;
  logic clk = 0;
  logic [9:0] rd_addr = '0, wr_addr = '0;
  logic signed [PW-1:0] rd_data, wr_data = '0;
  logic wr_en = 0;
  logic signed [PW-1:0] m[N];
  int checks = 0, failures = 0;

  neuron_memory #(.N_NEURONS(N), .POT_W(PW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      wr_en = 1; wr_addr = 10'(i); wr_data = PW'($urandom); m[i] = wr_data;
      @(negedge clk);
    end
    for (int n = 0; n < 5000; n++) begin
      rd_addr = 10'($urandom % N);
      wr_addr = rd_addr;
      #1;
      checks++;
      if (rd_data != m[rd_addr]) begin failures++; $display("FAIL: read %0d", rd_addr); end
      wr_en = $urandom % 2;
      wr_data = rd_data + PW'(7);
      @(negedge clk);
      if (wr_en) m[wr_addr] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
