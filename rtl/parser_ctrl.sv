// Parser handshake controller: moves one decoded message into the books.
//
// When the register bank holds a message (buffer_not_empty) and every book
// is idle (system_free), the controller latches the parser's decoded
// command, pulses buffer_taken for one cycle so the bank frees its buffer,
// and in the next cycle raises master_valid for one cycle with the latched
// command on cmd. Because every book was idle, the book that the command
// names takes it in that cycle. A message that activates no book is
// consumed without a master_valid pulse. slave_ready is high while the
// controller can take a message.
//
// Timing: message present and books free -> buffer_taken in that cycle,
// master_valid one cycle later; the next message can be taken once the
// books report free again.
//
// The signal names (buffer_not_empty, system_free, master_valid,
// slave_ready) and the two-bit state follow the design; the exact
// sequencing is this implementation's choice.
module parser_ctrl
  import book_pkg::*;
(
  input  logic     clk,
  input  logic     resetn,
  input  logic     buffer_not_empty,
  input  logic     system_free,
  input  command_t decoded,
  output logic     buffer_taken,
  output logic     master_valid,
  output logic     slave_ready,
  output command_t cmd
);

  typedef enum logic [1:0] {P_IDLE = 2'd0, P_ISSUE = 2'd1} pstate_t;
  pstate_t state;

  always_ff @(posedge clk) begin
    if (!resetn) begin
      state <= P_IDLE;
      cmd   <= '0;
    end else begin
      unique case (state)
        P_IDLE: begin
          if (buffer_not_empty && system_free) begin
            cmd <= decoded;
            if (decoded.stock_activate != '0) state <= P_ISSUE;
          end
        end
        P_ISSUE: state <= P_IDLE;
        default: state <= P_IDLE;
      endcase
    end
  end

  always_comb begin
    slave_ready  = (state == P_IDLE);
    buffer_taken = slave_ready && buffer_not_empty && system_free;
    master_valid = (state == P_ISSUE);
  end

  // The books were all idle when the command was latched and nothing else
  // drives them, so they must still be idle when it is issued.
  a_issue_free: assert property (@(posedge clk) disable iff (!resetn)
    master_valid |-> system_free);

endmodule
