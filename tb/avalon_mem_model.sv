// avalon_mem_model: behavioural Avalon-MM burst read slave standing in for
// the external SDRAM and its controller in the testbenches. Word-addressed
// storage of DEPTH 32-bit words (byte address / 4). A read request is
// accepted after a random number of waitrequest cycles (up to MAX_WAIT);
// the words of the burst are returned on consecutive addresses starting
// LATENCY cycles after acceptance, with random one-cycle gaps in
// readdatavalid when GAPS is set. One burst is served at a time. Counts
// the bursts and waitrequest cycles it produced.
`timescale 1ns/1ps
module avalon_mem_model #(
  parameter int DEPTH    = 1024,
  parameter int LATENCY  = 6,
  parameter int MAX_WAIT = 3,
  parameter bit GAPS     = 1,
  parameter int BC_W     = 8
) (
  input  logic            clk,
  input  logic [31:0]     address,
  input  logic            read,
  input  logic [BC_W-1:0] burstcount,
  output logic            waitrequest,
  output logic [31:0]     readdata,
  output logic            readdatavalid
);
  logic [31:0] mem [DEPTH];
  int bursts = 0, wait_cycles = 0;

  int busy = 0;          // words still to return
  int next_word;
  int delay;
  int wait_left = 0;
  bit  accepting = 0;

  initial begin
    waitrequest = 1; readdatavalid = 0; readdata = 0;
  end

  always @(posedge clk) begin
    readdatavalid <= 0;
    if (busy > 0) begin
      if (delay > 0) delay--;
      else if (!GAPS || $urandom_range(3) != 0) begin
        readdata      <= mem[next_word % DEPTH];
        readdatavalid <= 1;
        next_word++;
        busy--;
      end
    end
    if (read && busy == 0) begin
      if (!accepting) begin
        // first cycle of a request: waitrequest was high
        accepting = 1;
        wait_left = $urandom_range(MAX_WAIT);
        wait_cycles++;
      end else if (wait_left == 0) begin
        // accepted at this edge (waitrequest was low)
        busy      = int'(burstcount);
        next_word = int'(address >> 2);
        delay     = LATENCY;
        bursts++;
        accepting = 0;
      end else begin
        wait_left--;
        wait_cycles++;
      end
    end
    // a request withdrawn before acceptance (only seen around reset) is dropped
    if (!read) accepting = 0;
  end

  always @(negedge clk) waitrequest <= !(read && busy == 0 && accepting && wait_left == 0);
endmodule
