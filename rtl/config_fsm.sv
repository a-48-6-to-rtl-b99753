// Configuration FSM: the always-on controller in the kHz system-clock
// domain (8-32 kHz from the on-chip clock generator).
// 1. Clock division: fs_tick pulses once every fs_div system clocks (the
//    ADC sampling rate) and chop_tick once every chop_div clocks (the AFE
//    chopper), so Fs = Fsystem / fs_div.
// 2. Duty cycling between the two modes of the chip:
//      COLLECT: processors power-gated (en_sleep=1), fast oscillator off;
//               only the sensor interface and pre-processing run and the
//               FIFO fills.
//      WAKE:    burst_req seen: power switch on (en_sleep=0), oscillator on
//               (cpro_en=1), wait wake_cycles for the supply to settle.
//      BURST:   run=1, the burst domain drains the FIFO and computes.
//      RETIRE:  the burst domain raised done; run drops and the FSM waits
//               for done to fall (four-phase handshake), then sleeps again.
//    burst_req and done come from other clock domains and pass through
//    two-flop synchronisers here; run is synchronised on the other side.
// The two modes, the divided sampling clock and the power-gating control
// follow the document; the state sequence, the wake-up wait and the
// four-phase exchange are this design's choices. bursts counts completed
// bursts.
module config_fsm (
  input  logic clk,           // system clock
  input  logic rst_n,
  input  logic [15:0] fs_div,
  input  logic [15:0] chop_div,
  input  logic [7:0]  wake_cycles,
  output logic fs_tick,
  output logic chop_tick,
  input  logic burst_req,     // asynchronous level
  input  logic done,          // asynchronous level
  output logic en_sleep,
  output logic cpro_en,
  output logic run,
  output logic [15:0] bursts
);
  typedef enum logic [1:0] { S_COLLECT, S_WAKE, S_BURST, S_RETIRE } state_e;
  state_e state;
  logic [15:0] fs_cnt, chop_cnt;
  logic [7:0]  wcnt;
  logic req_m, req_s, done_m, done_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fs_cnt <= '0; chop_cnt <= '0; fs_tick <= 1'b0; chop_tick <= 1'b0;
    end else begin
      fs_tick   <= 1'b0;
      chop_tick <= 1'b0;
      if (fs_cnt + 1'b1 >= fs_div) begin fs_cnt <= '0; fs_tick <= 1'b1; end
      else fs_cnt <= fs_cnt + 1'b1;
      if (chop_cnt + 1'b1 >= chop_div) begin chop_cnt <= '0; chop_tick <= 1'b1; end
      else chop_cnt <= chop_cnt + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_m <= 1'b0; req_s <= 1'b0; done_m <= 1'b0; done_s <= 1'b0;
    end else begin
      req_m <= burst_req; req_s <= req_m;
      done_m <= done;     done_s <= done_m;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_COLLECT; wcnt <= '0; bursts <= '0;
    end else begin
      unique case (state)
        S_COLLECT: if (req_s) begin state <= S_WAKE; wcnt <= '0; end
        S_WAKE: begin
          wcnt <= wcnt + 1'b1;
          if (wcnt >= wake_cycles) state <= S_BURST;
        end
        S_BURST:  if (done_s) state <= S_RETIRE;
        S_RETIRE: if (!done_s) begin state <= S_COLLECT; bursts <= bursts + 1'b1; end
        default: state <= S_COLLECT;
      endcase
    end
  end

  assign en_sleep = (state == S_COLLECT);
  assign cpro_en  = (state != S_COLLECT);
  assign run      = (state == S_BURST);

  // the fast clock only runs while the processors are powered
  a_power: assert property (@(posedge clk) disable iff (!rst_n) cpro_en == !en_sleep);
  a_run:   assert property (@(posedge clk) disable iff (!rst_n) run |-> !en_sleep);
endmodule
