// adc_sequencer: drives the command side of the on-chip ADC and collects
// one result per sensor.
//
// After reset the sequencer asks for channel 1 and then holds its command
// valid high. Each time a response arrives it stores the 12-bit result in
// the holding register that belongs to its current state and asks for the
// next channel, so channels 1, 2, 3, 4 are requested round-robin forever.
// The state order and the register each state writes follow the original
// design (state 1 writes slot 3, state 2 slot 0, state 3 slot 1, state 4
// slot 2). Because the command stays valid, the converter accepts its next
// command before the new channel number is presented, so every response
// belongs to the channel requested one step earlier: after the first round
// slot n holds channel n+1 (slot 0 = channel 1 ... slot 3 = channel 4).
// Only the very first result (channel 1) lands in slot 3, and is replaced
// one round later.
// Interface: an Avalon-ST style command (valid, channel, start/end of
// packet) and response (valid, channel, data); the response channel is
// not used, as in the original. Resetting command_valid, the holding
// registers and the packet flags is this design's choice.
// Timing: one register update per accepted response, in the cycle after
// response_valid is sampled high.
module adc_sequencer
  import greenhouse_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // ADC command
  output logic             cmd_valid,
  output logic [4:0]       cmd_channel,
  output logic             cmd_sop,
  output logic             cmd_eop,
  input  logic             cmd_ready,
  // ADC response
  input  logic             rsp_valid,
  input  logic [4:0]       rsp_channel,
  input  adc_code_t        rsp_data,
  input  logic             rsp_sop,
  input  logic             rsp_eop,
  // Latest result per sensor slot
  output adc_code_t [NUM_SENSORS-1:0] adcin
);

  typedef enum logic [2:0] {SM0, SM1, SM2, SM3, SM4} seq_state_e;
  seq_state_e sm;

  // Unused inputs of the response bundle are kept for a complete port list.
  logic unused;
  assign unused = ^{cmd_ready, rsp_channel, rsp_sop, rsp_eop};

  assign cmd_sop = 1'b0;
  assign cmd_eop = 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sm          <= SM0;
      cmd_valid   <= 1'b0;
      cmd_channel <= 5'd0;
      adcin       <= '0;
    end else begin
      unique case (sm)
        SM0: begin
          sm          <= SM1;
          cmd_valid   <= 1'b1;
          cmd_channel <= 5'd1;
        end
        SM1: if (rsp_valid) begin
          cmd_channel <= 5'd2;
          adcin[3]    <= rsp_data;
          sm          <= SM2;
        end
        SM2: if (rsp_valid) begin
          cmd_channel <= 5'd3;
          adcin[0]    <= rsp_data;
          sm          <= SM3;
        end
        SM3: if (rsp_valid) begin
          cmd_channel <= 5'd4;
          adcin[1]    <= rsp_data;
          sm          <= SM4;
        end
        SM4: if (rsp_valid) begin
          cmd_channel <= 5'd1;
          adcin[2]    <= rsp_data;
          sm          <= SM1;
        end
        default: sm <= SM0;
      endcase
    end
  end

  // Only the four sensor channels are ever requested, and the request is
  // not withdrawn once the sequence has started.
  a_channel_range: assert property (@(posedge clk) disable iff (!rst_n)
    cmd_valid |-> (cmd_channel >= 5'd1 && cmd_channel <= 5'd4));
  a_valid_held: assert property (@(posedge clk) disable iff (!rst_n)
    cmd_valid |=> cmd_valid);

endmodule
