// xadc_sysmon: reads the Zynq XADC conversions of the three auxiliary inputs VAUX7, VAUX14
// and VAUX15 and holds them as AD7, AD14 and AD15.
//
// The XADC hard block runs its channel sequencer over the three inputs and pulses EOC at the
// end of every conversion, with CHANNEL naming the input just converted. This module then
// reads that input's status register over the dynamic reconfiguration port (DRP): it raises
// DEN for one cycle with DADDR = CHANNEL, waits for DRDY and stores DO[15:4], the 12-bit
// result, in the matching AD register. In the cycle after the store it pulses SynPul for one
// cycle. With the sequencer converting at 1 MSPS over three inputs each input is refreshed at
// about 333 kHz, while SynPul marks every conversion at 1 MHz; a filter clocked by SynPul thus
// sees each input at 1 MHz with every value held for three samples.
//
// From the document: the block's name, the three inputs and the AD7/AD14/AD15/SynPul outputs
// (Fig. 4), the 12-bit ADC, the 1 MHz maximum rate and the 333 kHz per-input rate. The DRP
// read sequence is the XADC's own; the one-pulse-per-conversion strobe is this design's reading
// of the two rates. Conversions of other channels are ignored. An EOC that arrives while a read
// is still pending is counted in `overrun` and dropped.
//
// Timing: SynPul rises 2 cycles after DRDY is seen (store, then strobe); reset is synchronous,
// active high, and clears the AD registers.
module xadc_sysmon
  import tof_pkg::*;
(
  input  logic              clk,        // DCLK of the XADC, system clock
  input  logic              reset_in,
  // XADC hard block
  input  logic              eoc,
  input  logic [4:0]        channel,
  output logic              den,
  output logic [6:0]        daddr,
  input  logic              drdy,
  input  logic [15:0]       do_data,
  // samples
  output logic [ADC_W-1:0]  ad7,
  output logic [ADC_W-1:0]  ad14,
  output logic [ADC_W-1:0]  ad15,
  output logic              syn_pul,
  output logic [7:0]        overrun
);

  typedef enum logic [1:0] {S_IDLE, S_READ, S_STORE} state_t;
  state_t     state;
  logic [4:0] ch_q;
  logic [ADC_W-1:0] data_q;

  always_ff @(posedge clk) begin
    den     <= 1'b0;
    syn_pul <= 1'b0;
    if (reset_in) begin
      state   <= S_IDLE;
      ch_q    <= '0;
      daddr   <= '0;
      data_q  <= '0;
      ad7     <= '0;
      ad14    <= '0;
      ad15    <= '0;
      overrun <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (eoc) begin
          den   <= 1'b1;
          daddr <= {2'b00, channel};
          ch_q  <= channel;
          state <= S_READ;
        end
        S_READ: begin
          if (eoc && overrun != '1) overrun <= overrun + 8'd1;
          if (drdy) begin
            data_q <= do_data[15:4];
            state  <= S_STORE;
          end
        end
        S_STORE: begin
          if (eoc && overrun != '1) overrun <= overrun + 8'd1;
          state <= S_IDLE;
          unique case (ch_q)
            CH_VAUX7:  begin ad7  <= data_q; syn_pul <= 1'b1; end
            CH_VAUX14: begin ad14 <= data_q; syn_pul <= 1'b1; end
            CH_VAUX15: begin ad15 <= data_q; syn_pul <= 1'b1; end
            default: ;
          endcase
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // DRDY answers a DEN and nothing else.
  a_drdy_expected: assert property (@(posedge clk) disable iff (reset_in)
                                    drdy |-> state == S_READ);

endmodule
