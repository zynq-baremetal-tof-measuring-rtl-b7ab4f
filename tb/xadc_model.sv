// xadc_model: behavioural model of the Zynq XADC hard block, for simulation only.
//
// It stands for the XADC in continuous channel-sequencer mode over the auxiliary inputs VAUX7,
// VAUX14 and VAUX15, converting at one result every CONV_CYCLES clocks (100 at 100 MHz gives
// the 1 MSPS maximum rate, 333 kSPS per input). The analogue inputs are given directly as
// 12-bit codes. At the end of a conversion the model stores the code, left-aligned, in that
// input's 16-bit status register (DRP address 0x10 + input number), and pulses EOC for one
// clock with CHANNEL naming the input. A DRP read (DEN with DADDR) is answered DRP_LATENCY
// clocks later with DRDY and DO. Only the ports the receiver uses are modelled.
module xadc_model #(
  parameter int unsigned CONV_CYCLES = 100,
  parameter int unsigned DRP_LATENCY = 4
) (
  input  logic        dclk,
  input  logic        reset,
  input  logic [11:0] code7,
  input  logic [11:0] code14,
  input  logic [11:0] code15,
  input  logic        den,
  input  logic [6:0]  daddr,
  output logic        drdy,
  output logic [15:0] do_data,
  output logic        eoc,
  output logic [4:0]  channel
);

  logic [15:0] status [32];
  int unsigned conv_cnt;
  int unsigned seq;
  int unsigned drp_cnt;
  logic [6:0]  drp_addr;
  logic [4:0]  ch;

  always_comb begin
    unique case (seq)
      0:       ch = 5'h17;
      1:       ch = 5'h1E;
      default: ch = 5'h1F;
    endcase
  end

  always_ff @(posedge dclk) begin
    eoc  <= 1'b0;
    drdy <= 1'b0;
    if (reset) begin
      conv_cnt <= 0;
      seq      <= 0;
      drp_cnt  <= 0;
      drp_addr <= '0;
      channel  <= '0;
      do_data  <= '0;
      for (int i = 0; i < 32; i++) status[i] <= '0;
    end else begin
      if (conv_cnt == CONV_CYCLES - 1) begin
        conv_cnt <= 0;
        unique case (seq)
          0:       status[5'h17] <= {code7,  4'h0};
          1:       status[5'h1E] <= {code14, 4'h0};
          default: status[5'h1F] <= {code15, 4'h0};
        endcase
        eoc     <= 1'b1;
        channel <= ch;
        seq     <= (seq == 2) ? 0 : seq + 1;
      end else begin
        conv_cnt <= conv_cnt + 1;
      end
      if (den) begin
        drp_cnt  <= DRP_LATENCY;
        drp_addr <= daddr;
      end else if (drp_cnt != 0) begin
        drp_cnt <= drp_cnt - 1;
        if (drp_cnt == 1) begin
          drdy    <= 1'b1;
          do_data <= status[drp_addr[4:0]];
        end
      end
    end
  end

endmodule
