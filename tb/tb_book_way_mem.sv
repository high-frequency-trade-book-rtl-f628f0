// Self-checking testbench for book_way_mem: writes random rows, reads them
// back through the asynchronous port in the same cycle as the address
// changes, checks that a disabled write changes nothing and that addresses
// at or past the end read zero.
module tb_book_way_mem;
  import book_pkg::*;

  localparam int ENTRIES = 12;
  localparam int AW = $clog2(ENTRIES + 1);

  logic          clk = 1'b0;
  logic          we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  entry_t        wdata = '0, rdata;
  entry_t        model [ENTRIES];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  book_way_mem #(.ENTRIES(ENTRIES)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_row(input int a, input entry_t d, input logic en);
    @(negedge clk);
    we = en; waddr = AW'(a); wdata = d;
    @(posedge clk);
    #1 we = 1'b0;
    if (en && a < ENTRIES) model[a] = d;
  endtask

  task automatic check_row(input int a);
    entry_t exp;
    raddr = AW'(a);
    #1;
    exp = (a < ENTRIES) ? model[a] : '0;
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("FAIL row %0d: got %h expected %h", a, rdata, exp);
    end
  endtask

  initial begin
    for (int a = 0; a < ENTRIES; a++) write_row(a, entry_t'({$urandom, $urandom, $urandom, $urandom}), 1'b1);
    for (int a = 0; a <= ENTRIES; a++) check_row(a);
    for (int t = 0; t < 400; t++) begin
      int a;
      logic en;
      a  = $urandom_range(0, ENTRIES - 1);
      en = 1'($urandom_range(0, 3) != 0);
      write_row(a, entry_t'({$urandom, $urandom, $urandom, $urandom}), en);
      check_row($urandom_range(0, ENTRIES));
      check_row(a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
