// tb_io_buffer: random push/pop traffic against a queue model of the I/O
// buffer, including filling it completely (wr_ready must fall at DEPTH words)
// and draining it (rd_valid must fall when empty).
module tb_io_buffer;
  localparam int DW = 8, DEPTH = 16;
  logic clk = 0, rst_n = 0;
  logic wr_valid, wr_ready, rd_valid, rd_ready;
  logic [DW-1:0] wr_data, rd_data;
  logic [DW-1:0] model [$];
  int checks = 0, failures = 0, fulls = 0, empties = 0;

  io_buffer #(.DW(DW), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_valid = 0; rd_ready = 0; wr_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      // phases: mostly-write, mostly-read, mixed
      wr_valid = ($urandom_range(0, 99) < ((t / 200) % 3 == 0 ? 90 : (t / 200) % 3 == 1 ? 10 : 50));
      rd_ready = ($urandom_range(0, 99) < ((t / 200) % 3 == 0 ? 10 : (t / 200) % 3 == 1 ? 90 : 50));
      wr_data  = DW'($urandom);
      #1;
      checks += 3;
      if (wr_ready != (model.size() < DEPTH)) failures++;
      if (rd_valid != (model.size() > 0)) failures++;
      if (rd_valid && rd_data != model[0]) failures++;
      if (!wr_ready) fulls++;
      if (!rd_valid) empties++;
      @(posedge clk);
      if (rd_valid && rd_ready) void'(model.pop_front());
      if (wr_valid && wr_ready) model.push_back(wr_data);
    end
    checks += 2;
    if (fulls == 0) failures++;
    if (empties == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
