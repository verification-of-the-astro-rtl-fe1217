// ae_cmd_ctrl: AE Command Controller.
//
// Sends one 16-bit command to an analog-electronics (AE) board over three
// lines, Data, Enable and Clock, and for the analog control unit (ACU) raises
// a fourth line, Act, after a hardware command such as a power switch.
//
// How it works. The serial Clock runs all the time, from a divider of the
// 20 MHz system clock, with HALF_PERIOD cycles per half period. A one-cycle
// `go` starts the state machine. Idle -> Synch waits for a falling edge of
// Clock and loads bit_cnt = 15 -> Clk Low / Clk High alternate once per bit,
// Enable high, Data showing command bit bit_cnt, MSB first -> after bit 0,
// Clk Low leaves with bit_cnt == 0 for Done -> Judge. For a hardware command
// (hw_cmd and HAS_ACT) Judge goes on to Att wait (ATT_WAIT_CYCLES) and
// Att High (Act high for ATT_HIGH_CYCLES), then Att done. Other commands go
// from Judge straight to Att done. Att done returns to Idle.
//
// Timing. Data changes when Clock falls and is stable while Clock is high, so
// the receiver samples it on the rising edge. One command takes 16 Clock
// periods. With the defaults (20 MHz, HALF_PERIOD 76) a Clock period is
// 7.6 us, Enable lasts 121.6 us, Act follows 121.9 us after Enable falls and
// stays high for 30 ms.
//
// From the design: the states and their order, the 16-bit MSB-first command,
// the bit counter loaded with 15, the 20 MHz clock, the 7.63 us Clock period,
// the 121.92 us and 30 ms of the Act pulse. Choices made here: the
// free-running Clock, the edge on which Data changes, and that a separate
// hw_cmd flag (written with the command) marks a hardware command.
module ae_cmd_ctrl #(
  parameter int unsigned HALF_PERIOD     = 76,      // 20 MHz cycles per half Clock period
  parameter int unsigned ATT_WAIT_CYCLES = 2438,    // 121.92 us at 20 MHz
  parameter int unsigned ATT_HIGH_CYCLES = 600000,  // 30 ms at 20 MHz
  parameter bit          HAS_ACT         = 1'b1     // board drives Act (ACU-GSE)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        go,          // one-cycle trigger from the VME side
  input  logic [15:0] cmd,         // command word, sampled with go
  input  logic        hw_cmd,      // hardware command: Act follows
  output logic        busy,        // not in Idle
  output logic        ae_data,     // serial command Data
  output logic        ae_enable,   // Enable, high while bits are sent
  output logic        ae_clock,    // serial Clock
  output logic        ae_act       // Act
);

  typedef enum logic [3:0] {
    S_IDLE, S_SYNCH, S_CLK_LOW, S_CLK_HIGH, S_DONE, S_JUDGE,
    S_ATT_WAIT, S_ATT_HIGH, S_ATT_DONE
  } state_e;

  localparam int unsigned DIV_W = $clog2(HALF_PERIOD + 1);
  localparam int unsigned ATT_W = $clog2((ATT_WAIT_CYCLES > ATT_HIGH_CYCLES ?
                                          ATT_WAIT_CYCLES : ATT_HIGH_CYCLES) + 1);

  state_e            state;
  logic [DIV_W-1:0]  div;
  logic              sclk;
  logic              tick;         // Clock toggles on this cycle's edge
  logic [3:0]        bit_cnt;
  logic              last;         // bit 0 has been clocked out
  logic [15:0]       shreg;
  logic              hw_q;
  logic [ATT_W-1:0]  att_cnt;

  // Free-running serial Clock.
  assign tick = (div == DIV_W'(HALF_PERIOD - 1));
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div  <= '0;
      sclk <= 1'b0;
    end else if (tick) begin
      div  <= '0;
      sclk <= ~sclk;
    end else begin
      div  <= div + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      bit_cnt <= '0;
      last    <= 1'b0;
      shreg   <= '0;
      hw_q    <= 1'b0;
      att_cnt <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (go) begin
          shreg <= cmd;
          hw_q  <= hw_cmd;
          state <= S_SYNCH;
        end
        S_SYNCH: if (tick && sclk) begin       // Clock is about to fall
          bit_cnt <= 4'd15;
          last    <= 1'b0;
          state   <= S_CLK_LOW;
        end
        S_CLK_LOW: begin
          if (last && bit_cnt == 4'd0) state <= S_DONE;
          else if (tick)               state <= S_CLK_HIGH;
        end
        S_CLK_HIGH: if (tick) begin            // Clock falls: next bit
          if (bit_cnt == 4'd0) last <= 1'b1;
          else begin
            bit_cnt <= bit_cnt - 1'b1;
            shreg   <= {shreg[14:0], 1'b0};
          end
          state <= S_CLK_LOW;
        end
        S_DONE:  state <= S_JUDGE;
        S_JUDGE: begin
          att_cnt <= '0;
          state   <= (HAS_ACT && hw_q) ? S_ATT_WAIT : S_ATT_DONE;
        end
        S_ATT_WAIT: begin
          if (att_cnt == ATT_W'(ATT_WAIT_CYCLES - 1)) begin
            att_cnt <= '0;
            state   <= S_ATT_HIGH;
          end else att_cnt <= att_cnt + 1'b1;
        end
        S_ATT_HIGH: begin
          if (att_cnt == ATT_W'(ATT_HIGH_CYCLES - 1)) begin
            att_cnt <= '0;
            state   <= S_ATT_DONE;
          end else att_cnt <= att_cnt + 1'b1;
        end
        S_ATT_DONE: state <= S_IDLE;
        default:    state <= S_IDLE;
      endcase
    end
  end

  // Outputs follow the state.
  always_comb begin
    ae_enable = (state == S_CLK_HIGH) || (state == S_CLK_LOW && !last);
    ae_data   = ae_enable & shreg[15];
    ae_clock  = sclk;
    ae_act    = (state == S_ATT_HIGH);
    busy      = (state != S_IDLE);
  end

endmodule
