// adc_model: behavioural stand-in for the FPGA's on-chip 12-bit ADC with
// an Avalon-ST command/response interface, for simulation only.
//
// When idle it raises cmd_ready; a command (cmd_valid high while ready)
// is accepted and its channel latched. LATENCY clocks later the model
// returns one response beat with that channel and the code currently on
// chan_code[channel] (a 12-bit value standing for the pin voltage), with
// start- and end-of-packet set, then becomes idle again. Channels outside
// 1..4 read as zero. Conversion time and behaviour are simplified; the
// real converter's sequencer, sample rate and calibration are not modelled.
module adc_model #(
  parameter int unsigned LATENCY = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [4:0][11:0]  chan_code,     // index = channel number
  input  logic              cmd_valid,
  input  logic [4:0]        cmd_channel,
  input  logic              cmd_sop,
  input  logic              cmd_eop,
  output logic              cmd_ready,
  output logic              rsp_valid,
  output logic [4:0]        rsp_channel,
  output logic [11:0]       rsp_data,
  output logic              rsp_sop,
  output logic              rsp_eop,
  output int unsigned       accepted
);

  logic       busy;
  int unsigned wait_cnt;
  logic [4:0] ch;
  logic       unused;
  assign unused = cmd_sop ^ cmd_eop;

  assign cmd_ready = !busy;
  assign rsp_sop   = rsp_valid;
  assign rsp_eop   = rsp_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      wait_cnt    <= 0;
      ch          <= '0;
      rsp_valid   <= 1'b0;
      rsp_channel <= '0;
      rsp_data    <= '0;
      accepted    <= 0;
    end else begin
      rsp_valid <= 1'b0;
      if (!busy) begin
        if (cmd_valid) begin
          busy     <= 1'b1;
          ch       <= cmd_channel;
          wait_cnt <= LATENCY;
          accepted <= accepted + 1;
        end
      end else if (wait_cnt > 1) begin
        wait_cnt <= wait_cnt - 1;
      end else begin
        busy        <= 1'b0;
        rsp_valid   <= 1'b1;
        rsp_channel <= ch;
        rsp_data    <= (ch >= 5'd1 && ch <= 5'd4) ? chan_code[ch[2:0]] : 12'd0;
      end
    end
  end

endmodule
