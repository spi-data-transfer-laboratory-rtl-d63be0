// SPI slave datapath.
//
// A state machine on the same slow SPI clock as the master that follows
// the master's SCLK level by level (SCLK runs at half the state clock, so
// every level lasts at least one cycle). From IDLE:
//
//   srds (slave -> master): latch the switches into the LED register and
//         put the MSB on MISO; once SS is high, wait for each SCLK high and
//         then SCLK low, moving MISO to the next bit on each low. After the
//         W-th low it returns to IDLE.
//   SS low (master -> slave, taken only when srds is low): on each SCLK
//         high take MOSI into LED register bit idx (MSB first), then wait
//         for SCLK low; after W bits return to IDLE. A received bit
//         replaces only its own LED bit.
//
// The handshake, MSB-first order and one-level-per-state tracking follow
// the lab's slave; the bit-index encoding, the width parameter W and the
// reset value of MISO are this design's. srds is a level request, so while
// it stays set the slave reloads and offers its word again after each
// read.
//
// Interface: spisdclk, the SPI state clock; sdrst, synchronous clear of the
// LED register and state; srds, level request; sw, the word to offer;
// swled, the slave's register (shown on LEDs); sclk, mosi, ss from the
// master; miso, registered output.
module spisdtpth #(
  parameter int unsigned W = spilab_pkg::DATA_W
) (
  input  logic         spisdclk,
  input  logic         srds,
  input  logic         sdrst,
  input  logic [W-1:0] sw,
  output logic [W-1:0] swled,
  input  logic         sclk,
  input  logic         mosi,
  input  logic         ss,
  output logic         miso
);
  localparam int unsigned IW = (W > 1) ? $clog2(W) : 1;
  localparam logic [IW-1:0] MSB = IW'(W - 1);

  typedef enum logic [2:0] {
    IDLE,        // wait for srds or SS low
    TX_LOAD,     // latch switches, MSB on MISO, wait for SS high
    TX_WAIT_HI,  // wait for SCLK high (master samples)
    TX_WAIT_LO,  // wait for SCLK low, then next bit on MISO
    RX_WAIT_HI,  // wait for SCLK high, take MOSI
    RX_WAIT_LO   // wait for SCLK low
  } sstate_t;

  sstate_t       state;
  logic [IW-1:0] idx;

  always_ff @(posedge spisdclk) begin
    if (sdrst) begin
      state <= IDLE;
      idx   <= MSB;
      swled <= '0;
      miso  <= 1'b0;
    end else begin
      unique case (state)
        IDLE: begin
          idx <= MSB;
          if (srds)     state <= TX_LOAD;
          else if (!ss) state <= RX_WAIT_HI;
        end
        TX_LOAD: begin
          swled <= sw;
          miso  <= sw[W-1];
          if (ss) state <= TX_WAIT_HI;
        end
        TX_WAIT_HI: if (sclk) state <= TX_WAIT_LO;
        TX_WAIT_LO: if (!sclk) begin
          if (idx == 0) begin
            state <= IDLE;
          end else begin
            miso  <= swled[idx - 1'b1];
            idx   <= idx - 1'b1;
            state <= TX_WAIT_HI;
          end
        end
        RX_WAIT_HI: if (sclk) begin
          swled[idx] <= mosi;
          state      <= RX_WAIT_LO;
        end
        RX_WAIT_LO: if (!sclk) begin
          if (idx == 0) begin
            state <= IDLE;
          end else begin
            idx   <= idx - 1'b1;
            state <= RX_WAIT_HI;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
