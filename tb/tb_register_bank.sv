// Self-checking testbench for register_bank: writes messages over the bus,
// checks ff_buffer byte order, read-back, the BUFFER_NOT_EMPTY flag being
// set by software and cleared by buffer_taken, READPORT, that message
// writes are ignored while the flag is set, and that nothing is written
// without chipselect.
module tb_register_bank;
  import book_pkg::*;

  logic         clk = 1'b0, reset = 1'b1;
  logic [7:0]   writedata = '0;
  logic         write = 1'b0, read = 1'b0, chipselect = 1'b0;
  logic [5:0]   address = '0;
  logic [7:0]   readdata;
  logic         buffer_taken = 1'b0;
  logic [319:0] ff_buffer;
  logic         buffer_not_empty;
  logic [7:0]   model [40];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  register_bank dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input logic [319:0] got, input logic [319:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic bus_write(input int a, input logic [7:0] d, input logic cs = 1'b1);
    @(negedge clk);
    chipselect = cs; write = 1'b1; address = 6'(a); writedata = d;
    @(posedge clk);
    #1 chipselect = 1'b0; write = 1'b0;
  endtask

  task automatic bus_read(input int a, output logic [7:0] d);
    @(negedge clk);
    chipselect = 1'b1; read = 1'b1; address = 6'(a);
    #1 d = readdata;
    @(posedge clk);
    #1 chipselect = 1'b0; read = 1'b0;
  endtask

  function automatic logic [319:0] model_buf();
    logic [319:0] r;
    for (int k = 0; k < 40; k++) r[319 - 8*k -: 8] = model[k];
    return r;
  endfunction

  initial begin
    logic [7:0] d;
    foreach (model[k]) model[k] = '0;
    repeat (2) @(posedge clk);
    reset = 1'b0;
    expect_eq("flag after reset", 320'(buffer_not_empty), 320'(0));
    for (int m = 0; m < 30; m++) begin
      for (int k = 0; k < 40; k++) begin
        model[k] = 8'($urandom);
        bus_write(k, model[k]);
      end
      bus_write($urandom_range(0, 39), 8'($urandom), 1'b0);   // no chipselect
      expect_eq("ff_buffer", ff_buffer, model_buf());
      bus_read(ADDR_READPORT, d);
      expect_eq("readport free", 320'(d), 320'(1));
      bus_write(ADDR_BUFFER_NOT_EMPTY, 8'd1);
      expect_eq("flag set", 320'(buffer_not_empty), 320'(1));
      bus_read(ADDR_BUFFER_NOT_EMPTY, d);
      expect_eq("flag read", 320'(d), 320'(1));
      bus_read(ADDR_READPORT, d);
      expect_eq("readport busy", 320'(d), 320'(0));
      bus_write($urandom_range(0, 39), 8'($urandom));          // ignored
      expect_eq("protected", ff_buffer, model_buf());
      for (int k = 0; k < 40; k++) begin
        bus_read(k, d);
        expect_eq("read back", 320'(d), 320'(model[k]));
      end
      @(negedge clk) buffer_taken = 1'b1;
      @(posedge clk) #1 buffer_taken = 1'b0;
      expect_eq("flag cleared", 320'(buffer_not_empty), 320'(0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
