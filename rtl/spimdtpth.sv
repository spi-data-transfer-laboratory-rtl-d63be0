// SPI master datapath.
//
// A state machine clocked by the slow SPI clock that drives SCLK, MOSI and
// SS itself, one SCLK level per clock cycle (SCLK = clock / 2 while
// shifting). From IDLE it starts one of two transfers:
//
//   mrds  (master -> slave): load the switches into the LED register, pull
//         SS low with the MSB on MOSI, then W pulses of SCLK. MOSI changes
//         only on the cycles where SCLK goes low, so it is stable while
//         SCLK is high, when the slave samples it. SS rises with the last
//         SCLK high. 2*W+1 cycles, plus the IDLE cycle.
//   rdslv (slave -> master): SS stays high (the slave takes SS high as
//         the go-ahead to drive MISO). Each bit is one SCLK high, one
//         cycle later the MISO sample into LED register bit idx (MSB
//         first), then SCLK low. 3*W+1 cycles, plus the IDLE cycle.
//
// rdslv has priority over mrds. The transmit bits after the MSB are taken
// from the switch inputs at the cycle they are driven, as in the lab; the
// LED register shows the switches sampled at the start. A received bit
// replaces only its own LED bit. These sequences and the state-by-state
// cycle timing follow the lab's master; the compact encoding (a bit index
// instead of one state per bit), the width parameter W and the reset
// values of SCLK and SS are this design's.
//
// Interface: spimdclk, the SPI state clock; mdrst, synchronous clear of
// the LED register and the state machine; mrds / rdslv, level requests
// sampled in IDLE; sw, the word to send; swled, the master's register
// (shown on LEDs); sclk, mosi, ss, registered SPI outputs; miso from the
// slave.
module spimdtpth #(
  parameter int unsigned W = spilab_pkg::DATA_W
) (
  input  logic         spimdclk,
  input  logic         mrds,
  input  logic         mdrst,
  input  logic         rdslv,
  input  logic [W-1:0] sw,
  output logic [W-1:0] swled,
  output logic         sclk,
  output logic         mosi,
  output logic         ss,
  input  logic         miso
);
  localparam int unsigned IW = (W > 1) ? $clog2(W) : 1;
  localparam logic [IW-1:0] MSB = IW'(W - 1);

  typedef enum logic [2:0] {
    IDLE,       // SCLK low, SS high, wait for a request
    TX_LOAD,    // latch switches, SS low, MSB on MOSI
    TX_HI,      // SCLK high: slave samples MOSI
    TX_LO,      // SCLK low: next bit on MOSI
    RX_START,   // SCLK low, SS high
    RX_HI,      // SCLK high: slave holds its bit
    RX_SAMPLE,  // take MISO
    RX_LO       // SCLK low: slave moves to the next bit
  } mstate_t;

  mstate_t       state;
  logic [IW-1:0] idx;   // bit being sent or received

  always_ff @(posedge spimdclk) begin
    if (mdrst) begin
      state <= IDLE;
      idx   <= MSB;
      swled <= '0;
      mosi  <= 1'b0;
      sclk  <= 1'b0;
      ss    <= 1'b1;
    end else begin
      unique case (state)
        IDLE: begin
          sclk <= 1'b0;
          ss   <= 1'b1;
          idx  <= MSB;
          if (rdslv)     state <= RX_START;
          else if (mrds) state <= TX_LOAD;
        end
        TX_LOAD: begin
          swled <= sw;
          ss    <= 1'b0;
          mosi  <= sw[W-1];
          state <= TX_HI;
        end
        TX_HI: begin
          sclk  <= 1'b1;
          if (idx == 0) ss <= 1'b1;
          state <= TX_LO;
        end
        TX_LO: begin
          sclk <= 1'b0;
          if (idx == 0) begin
            state <= IDLE;
          end else begin
            mosi  <= sw[idx - 1'b1];
            idx   <= idx - 1'b1;
            state <= TX_HI;
          end
        end
        RX_START: begin
          sclk  <= 1'b0;
          ss    <= 1'b1;
          state <= RX_HI;
        end
        RX_HI: begin
          sclk  <= 1'b1;
          state <= RX_SAMPLE;
        end
        RX_SAMPLE: begin
          swled[idx] <= miso;
          state      <= RX_LO;
        end
        RX_LO: begin
          sclk <= 1'b0;
          if (idx == 0) begin
            state <= IDLE;
          end else begin
            idx   <= idx - 1'b1;
            state <= RX_HI;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // MOSI never changes while SCLK is high.
  a_mosi_stable: assert property (@(posedge spimdclk) disable iff (mdrst)
    $changed(mosi) |-> !sclk);
  // SS is low for every SCLK pulse of a master -> slave word but the last.
  a_ss_framing: assert property (@(posedge spimdclk) disable iff (mdrst)
    (state == TX_LO && idx != 0) |-> !ss);
endmodule
