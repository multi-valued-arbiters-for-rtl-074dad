// puf_switch_stage: one stage L_n of an arbiter-PUF delay chain.
//
// Two 2:1 multiplexers share the challenge bit ch. With ch = 0 each path goes
// straight through (upper in -> upper out, lower in -> lower out); with ch = 1
// the paths cross. In silicon the two multiplexers and their routing have
// slightly different delays, and that difference, accumulated over the chain,
// is the secret the PUF measures. The RTL describes only the switching; it is
// purely combinational and has no clock.
//
// Follows the published design: the multiplexer pair and the meaning of the select bit
// (input 0 straight, input 1 crossed) are as drawn for the stage.
module puf_switch_stage (
  input  logic in_top,   // upper path entering the stage
  input  logic in_bot,   // lower path entering the stage
  input  logic ch,       // challenge bit Ch_n
  output logic out_top,  // upper path leaving the stage
  output logic out_bot   // lower path leaving the stage
);
  assign out_top = ch ? in_bot : in_top;
  assign out_bot = ch ? in_top : in_bot;
endmodule
