// tb_instr_memory: loads 64 pseudo-random words through the load port, then
// fetches them back in a scrambled order and checks each word arrives one
// cycle after its address.
module tb_instr_memory;
  logic clk = 0;
  logic [31:0] fetch_addr = '0, fetch_data, load_addr = '0, load_data = '0;
  logic load_we = 0;
  int checks = 0, failures = 0;
  logic [31:0] img [64];

  instr_memory #(.DEPTH(64)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) img[i] = 32'h9E37_79B9 * (i + 1) ^ 32'(i << 7);
    @(negedge clk);
    for (int i = 0; i < 64; i++) begin
      load_we = 1; load_addr = 32'(4 * i); load_data = img[i];
      @(negedge clk);
    end
    load_we = 0;
    for (int k = 0; k < 64; k++) begin
      int i;
      i = (k * 37) % 64;
      fetch_addr = 32'(4 * i);
      @(negedge clk);
      checks++;
      if (fetch_data !== img[i]) begin
        failures++;
        $display("FAIL: word %0d read %h expected %h", i, fetch_data, img[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
