// acq_buffer: on-chip acquisition memory for random bit sequences.
//
// Capture phase: after start, each valid input bit is shifted into a byte
// (first bit in the most significant position); every eighth bit the byte
// is written into a RAM of DEPTH bytes. Capture ends when len_bytes bytes
// have been stored (len_bytes = 0 or above DEPTH is treated as DEPTH).
// Read-out phase: the bytes are then read back in order and offered on a
// valid/ready byte interface (for the serial transmitter); a byte is
// handed over when tx_valid_o and tx_ready_i are both high. done_o pulses
// for one cycle after the last byte is accepted, and busy_o is high from
// start until then.
//
// Timing: capture takes 8 valid bits per byte and ends on the last one;
// the read-out spends one cycle on the synchronous RAM read and one on
// loading the output register per byte, then waits for the consumer, so an
// always-ready consumer gets a byte every 3 clocks.
// The default DEPTH of 131072 bytes (1,048,576 bits) holds one sequence of
// one million bits, the length used in the published measurements. The
// collect-into-RAM-then-send structure follows that set-up; the byte
// packing, handshake and memory organisation are this design's own.
module acq_buffer #(
  parameter int unsigned DEPTH = 131072,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start_i,
  input  logic [AW:0] len_bytes_i,
  input  logic        bit_valid_i,
  input  logic        bit_i,
  output logic        tx_valid_o,
  output logic [7:0]  tx_data_o,
  input  logic        tx_ready_i,
  output logic        busy_o,
  output logic        done_o
);

  typedef enum logic [1:0] {A_IDLE, A_CAPTURE, A_READ, A_SEND} acq_state_t;

  logic [7:0]  mem [DEPTH];
  acq_state_t  state;
  logic [AW:0] len, addr;
  logic [6:0]  shreg;
  logic [2:0]  nbits;
  logic [7:0]  rd_data;

  // Synchronous-read, single-port RAM (maps to block RAM).
  logic        we;
  logic [AW-1:0] ram_addr;
  logic [7:0]  wdata;

  assign wdata    = {shreg, bit_i};
  assign we       = (state == A_CAPTURE) && bit_valid_i && (nbits == 3'd7);
  assign ram_addr = addr[AW-1:0];

  always_ff @(posedge clk) begin
    if (we) mem[ram_addr] <= wdata;
    rd_data <= mem[ram_addr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= A_IDLE;
      len        <= '0;
      addr       <= '0;
      shreg      <= '0;
      nbits      <= '0;
      tx_valid_o <= 1'b0;
      tx_data_o  <= '0;
      done_o     <= 1'b0;
    end else begin
      done_o <= 1'b0;
      unique case (state)
        A_IDLE: if (start_i) begin
          len   <= (len_bytes_i == '0 || len_bytes_i > (AW+1)'(DEPTH)) ? (AW+1)'(DEPTH) : len_bytes_i;
          addr  <= '0;
          nbits <= '0;
          state <= A_CAPTURE;
        end
        A_CAPTURE: if (bit_valid_i) begin
          shreg <= wdata[6:0];
          nbits <= nbits + 1'b1;
          if (nbits == 3'd7) begin
            if (addr + 1'b1 == len) begin
              addr  <= '0;
              state <= A_READ;
            end else begin
              addr <= addr + 1'b1;
            end
          end
        end
        A_READ: state <= A_SEND;   // RAM read of addr in flight
        A_SEND: begin
          if (!tx_valid_o) begin
            tx_valid_o <= 1'b1;
            tx_data_o  <= rd_data;
          end else if (tx_ready_i) begin
            tx_valid_o <= 1'b0;
            if (addr + 1'b1 == len) begin
              done_o <= 1'b1;
              state  <= A_IDLE;
            end else begin
              addr  <= addr + 1'b1;
              state <= A_READ;
            end
          end
        end
        default: state <= A_IDLE;
      endcase
    end
  end

  assign busy_o = (state != A_IDLE);

  // Valid/ready rule: an offered byte stays offered, unchanged, until taken.
  a_tx_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (tx_valid_o && !tx_ready_i) |=> (tx_valid_o && $stable(tx_data_o)));

endmodule
