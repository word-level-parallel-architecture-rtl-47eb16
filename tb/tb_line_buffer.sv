// tb_line_buffer: self-checking test of the previous-stripe line buffer.
//
// Random writes and reads (including a read of the address written in the
// same cycle, which must return the old word) are compared with a model, for
// the 64-entry buffer of 64x64 code-blocks. Reads are asynchronous, writes
// take effect at the clock edge. Cycle watchdog.
module tb_line_buffer;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc > 100000) begin
      $display("ERROR watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
      $finish;
    end
  end

  logic        we;
  logic [5:0]  waddr, raddr;
  logic [11:0] wdata, rdata;

  line_buffer dut (.clk, .we_i(we), .waddr_i(waddr), .wdata_i(wdata), .raddr_i(raddr), .rdata_o(rdata));

  int checks = 0, failures = 0, n_same = 0;
  logic [11:0] model [64];
  bit          written [64];

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < 64; i++) written[i] = 0;
    // fill every entry once
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      we = 1; waddr = 6'(i); wdata = 12'($urandom); model[i] = wdata; written[i] = 1;
    end
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      we    = ($urandom_range(1, 0) != 0);
      waddr = 6'($urandom);
      raddr = ($urandom_range(3, 0) == 0) ? waddr : 6'($urandom);
      wdata = 12'($urandom);
      #1;
      checks++;
      if (raddr == waddr && we) n_same++;
      if (rdata !== model[raddr]) begin
        failures++;
        if (failures < 10) $display("ERROR read %0d: got %h expected %h", raddr, rdata, model[raddr]);
      end
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    checks++;
    if (n_same == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
