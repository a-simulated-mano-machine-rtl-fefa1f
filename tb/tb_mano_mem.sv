// tb_mano_mem: tests the 4096 x 16 memory at full size. Checks that all
// words start at zero, that a write through the bus port and through the
// host load port lands at the right address, that the load port wins when
// both write, that a read is visible in the same cycle and that with `read`
// low the output is zero. A reference array in the testbench gives the
// expected contents.
module tb_mano_mem;
  import mano_pkg::*;
  logic clk = 1'b0;
  logic [11:0] addr, load_addr;
  word_t wdata, load_data, rdata;
  logic read, write, load_we;
  word_t ref_mem [4096];
  int checks = 0, failures = 0;

  mano_mem dut (.clk, .addr, .wdata, .read, .write, .rdata,
                .load_we, .load_addr, .load_data);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_read(input logic [11:0] a);
    addr = a; read = 1'b1; #1;
    checks++;
    if (rdata !== ref_mem[a]) begin
      failures++;
      $display("read %h got %h exp %h", a, rdata, ref_mem[a]);
    end
  endtask

  initial begin
    read = 0; write = 0; load_we = 0; addr = '0; wdata = '0;
    load_addr = '0; load_data = '0;
    foreach (ref_mem[k]) ref_mem[k] = '0;
    // reset contents are zero
    for (int k = 0; k < 4096; k += 37) check_read(12'(k));
    check_read(12'hFFF);
    // read disabled gives zero
    @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      addr      = 12'($urandom);
      wdata     = 16'($urandom);
      load_addr = ($urandom_range(0, 3) == 0) ? addr : 12'($urandom);
      load_data = 16'($urandom);
      write     = ($urandom_range(0, 1) == 0);
      load_we   = ($urandom_range(0, 3) == 0);
      read      = 1'b0;
      #1;
      checks++;
      if (rdata !== 16'h0000) begin failures++; $display("read low gave %h", rdata); end
      @(posedge clk);
      if (load_we)    ref_mem[load_addr] = load_data;
      else if (write) ref_mem[addr]      = wdata;
      #1;
      write = 0; load_we = 0;
      check_read(addr);
      check_read(load_addr);
      check_read(12'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
