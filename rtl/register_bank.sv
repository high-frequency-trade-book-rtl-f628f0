// Bus-side register bank (Avalon memory-mapped slave, 8-bit data).
//
// Software writes one market message byte by byte at addresses 0..39
// (byte k of the message at address k, so the message type is at 0 and the
// timestamp starts at 1), then writes 1 to BUFFER_NOT_EMPTY (address 40)
// to hand it over. The flag clears when the parser takes the message
// (buffer_taken). While the flag is set, writes to the message bytes are
// ignored. READPORT (address 41) reads 1 when the buffer is free for the
// next message. Reads return data in the same cycle (read latency 0);
// addresses 0..39 read back the message bytes.
//
// The bus ports (clk, reset, writedata[7:0], write, chipselect,
// address[5:0], read, readdata[7:0]) and the BUFFER_NOT_EMPTY / READPORT
// registers follow the design; one byte per address and the two register
// addresses are this implementation's choice.
module register_bank
  import book_pkg::*;
(
  input  logic         clk,
  input  logic         reset,
  input  logic [7:0]   writedata,
  input  logic         write,
  input  logic         read,
  input  logic         chipselect,
  input  logic [5:0]   address,
  output logic [7:0]   readdata,
  input  logic         buffer_taken,
  output logic [319:0] ff_buffer,
  output logic         buffer_not_empty
);

  logic [7:0] msg [MSG_BYTES];

  always_ff @(posedge clk) begin
    if (reset) begin
      buffer_not_empty <= 1'b0;
      for (int k = 0; k < MSG_BYTES; k++) msg[k] <= '0;
    end else begin
      if (buffer_taken) buffer_not_empty <= 1'b0;
      if (chipselect && write) begin
        if (32'(address) < MSG_BYTES) begin
          if (!buffer_not_empty) msg[address] <= writedata;
        end else if (address == ADDR_BUFFER_NOT_EMPTY) begin
          buffer_not_empty <= writedata[0];
        end
      end
    end
  end

  always_comb begin
    for (int k = 0; k < MSG_BYTES; k++) ff_buffer[319 - 8*k -: 8] = msg[k];
    readdata = '0;
    if (chipselect && read) begin
      if (32'(address) < MSG_BYTES)                readdata = msg[address];
      else if (address == ADDR_BUFFER_NOT_EMPTY)   readdata = {7'b0, buffer_not_empty};
      else if (address == ADDR_READPORT)           readdata = {7'b0, !buffer_not_empty};
    end
  end

endmodule
