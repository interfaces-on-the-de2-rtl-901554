// i2c_loader: I2C master that writes one byte into a register of the video decoder.
//
// On a rising edge of `go` it sends, on the open-drain SCL/SDA pair:
//   start, command byte, ack slot, register address byte, ack slot, data byte, ack slot, stop
// Bytes go most significant bit first. The loader takes one step per `step_tick` (four
// per serial clock period, from i2c_clock_divider). Each of the 27 bit slots is four steps:
//   step 0  SDA takes the bit ("setup", SCL has been low for one step)
//   step 1  SCL rises: the slave takes the bit ("load")
//   step 2  SCL stays high
//   step 3  the acknowledge is sampled (ninth slot only), then SCL falls
// Start: SDA falls while SCL is high, and on the next step SCL falls. Stop: SDA is
// pulled low, SCL rises on the next step, and SDA rises on the step after that.
// In each acknowledge slot the master releases SDA; a high level when it is sampled is
// a missing acknowledge and sets `ack_error` for this transfer. The transfer still runs
// to its stop (no retry).
// A transfer takes 2 + 27*4 + 3 = 113 steps from the step that sees the request, plus
// one step to report `done` (a one-clock pulse): about 0.7 ms at 40 kHz.
// The frame format (command, address, data, acknowledges, start and stop shapes) is
// the tutorial's; the four-step bit timing, the go edge detection and the error flag
// are this design's.
module i2c_loader (
  input  logic       clk,           // 27 MHz
  input  logic       rst,           // synchronous, active high
  input  logic       step_tick,     // step enable, four per serial clock period
  input  logic       go,            // asynchronous start request (switch); acts on its rising edge
  input  logic [7:0] command,
  input  logic [7:0] address,
  input  logic [7:0] data,
  input  logic       sda_i,         // level on the SDA line
  output logic       scl,           // SCL level (the master is the only clock source)
  output logic       sda_drive_low, // 1: pull SDA low, 0: release it (open drain)
  output logic       busy,
  output logic       done,          // one-clock pulse at the end of a transfer
  output logic       ack_error      // the last transfer missed at least one acknowledge
);
  typedef enum logic [2:0] {IDLE, START, BITS, STOP_A, STOP_B, STOP_C} state_t;

  state_t      state;
  logic [23:0] shreg;        // bits still to send, next one at [23]
  logic [4:0]  slot;         // 0..26: bit slot of the whole transfer
  logic [3:0]  bit_in_byte;  // 0..8, 8 is the acknowledge slot
  logic [1:0]  phase;
  logic        go_meta, go_sync, go_prev, pending;

  always_ff @(posedge clk) begin
    go_meta <= go;
    go_sync <= go_meta;
    go_prev <= go_sync;
  end

  wire go_rise  = go_sync && !go_prev;
  wire ack_slot = (bit_in_byte == 4'd8);

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      state         <= IDLE;
      scl           <= 1'b1;
      sda_drive_low <= 1'b0;
      pending       <= 1'b0;
      ack_error     <= 1'b0;
      shreg         <= '0;
      slot          <= '0;
      bit_in_byte   <= '0;
      phase         <= '0;
    end else begin
      if (go_rise) pending <= 1'b1;
      if (step_tick) begin
        unique case (state)
          IDLE: begin
            scl           <= 1'b1;
            sda_drive_low <= 1'b0;
            if (pending || go_rise) begin
              pending       <= 1'b0;
              shreg         <= {command, address, data};
              slot          <= '0;
              bit_in_byte   <= '0;
              phase         <= '0;
              ack_error     <= 1'b0;
              sda_drive_low <= 1'b1;          // start: SDA falls while SCL is high
              state         <= START;
            end
          end
          START: begin
            scl   <= 1'b0;                    // next step SCL falls
            state <= BITS;
          end
          BITS: begin
            phase <= phase + 1'b1;
            unique case (phase)
              2'd0: begin                     // setup
                if (ack_slot) sda_drive_low <= 1'b0;
                else          sda_drive_low <= !shreg[23];
              end
              2'd1: scl <= 1'b1;              // load
              2'd2: ;
              2'd3: begin
                if (ack_slot && sda_i) ack_error <= 1'b1;
                scl <= 1'b0;
                if (!ack_slot) shreg <= {shreg[22:0], 1'b0};
                bit_in_byte <= ack_slot ? 4'd0 : bit_in_byte + 1'b1;
                slot        <= slot + 1'b1;
                if (slot == 5'd26) state <= STOP_A;
              end
            endcase
          end
          STOP_A: begin
            sda_drive_low <= 1'b1;            // SDA low while SCL is low
            state         <= STOP_B;
          end
          STOP_B: begin
            scl   <= 1'b1;                    // SCL rises first
            state <= STOP_C;
          end
          STOP_C: begin
            sda_drive_low <= 1'b0;            // then SDA rises: stop
            done          <= 1'b1;
            state         <= IDLE;
          end
          default: state <= IDLE;
        endcase
      end
    end
  end

  assign busy = (state != IDLE);

endmodule
