// Self-checking testbench for parser_ctrl. A cycle-level model of the
// expected protocol runs beside the block: a message is taken (one-cycle
// buffer_taken) only while the block is idle, the buffer is full and the
// books are free; master_valid follows one cycle later with the command
// latched at take time, and never for a command that activates nothing.
// The buffer flag and system_free are driven randomly, the flag being
// cleared by buffer_taken as the register bank would.
module tb_parser_ctrl;
  import book_pkg::*;

  logic     clk = 1'b0, resetn = 1'b0;
  logic     buffer_not_empty = 1'b0, system_free = 1'b0;
  command_t decoded = '0;
  logic     buffer_taken, master_valid, slave_ready;
  command_t cmd;
  int checks = 0, failures = 0;
  int n_taken = 0, n_issued = 0, n_dropped = 0, n_wait_busy = 0;

  always #5 clk = ~clk;

  parser_ctrl dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input logic [159:0] got, input logic [159:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %h expected %h", what, $time, got, exp);
    end
  endtask

  // Reference state.
  logic     m_issue = 1'b0;
  command_t m_cmd = '0;

  initial begin
    repeat (2) @(posedge clk);
    resetn = 1'b1;
    for (int t = 0; t < 5000; t++) begin
      logic exp_take;
      @(negedge clk);
      if (!buffer_not_empty && $urandom_range(0, 2) == 0) begin
        buffer_not_empty = 1'b1;
        decoded = command_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
        if ($urandom_range(0, 4) == 0) decoded.stock_activate = '0;
      end
      system_free = m_issue || master_valid || ($urandom_range(0, 3) != 0);
      #1;
      exp_take = !m_issue && buffer_not_empty && system_free;
      if (!m_issue && buffer_not_empty && !system_free) n_wait_busy++;
      expect_eq("slave_ready", 160'(slave_ready), 160'(!m_issue));
      expect_eq("buffer_taken", 160'(buffer_taken), 160'(exp_take));
      expect_eq("master_valid", 160'(master_valid), 160'(m_issue));
      if (m_issue) expect_eq("cmd", 160'(cmd), 160'(m_cmd));
      @(posedge clk);
      #1;
      m_issue = 1'b0;
      if (exp_take) begin
        n_taken++;
        buffer_not_empty = 1'b0;
        m_cmd = decoded;
        if (decoded.stock_activate != '0) begin m_issue = 1'b1; n_issued++; end
        else n_dropped++;
      end
    end
    $display("taken=%0d issued=%0d dropped=%0d waits=%0d", n_taken, n_issued, n_dropped, n_wait_busy);
    checks++;
    if (n_issued == 0 || n_dropped == 0 || n_wait_busy == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
