// kbd_device: keyboard device registers and interrupt logic.
//
// Two registers in the I/O page: KBSR (status) at offset 0 and KBDR (data)
// at offset 1, i.e. xFFE0 and xFFE1. A key event (key_valid with key_char)
// stores the character in KBDR and sets KBSR[15] (ready). KBSR[14] is the
// interrupt enable and is the only KBSR bit software can write. Reading
// KBDR clears ready. The device requests an interrupt while ready and
// enable are both set; irq_pl is its fixed priority level, which the
// processor compares with PSR[10:8]. A request is accepted at the start of
// an instruction fetch and the processor then jumps through vector x0180.
//
// Bus timing matches lc3_memory: sel (request while the address is in the
// I/O page), answer and ready one cycle later. Register offsets, the
// status-bit layout and the priority level 4 are this design's choices.
module kbd_device
  import lc3_pkg::*;
#(
  parameter logic [2:0] PRIORITY = 3'd4
) (
  input  logic       clk,
  input  logic       rst,
  // bus side
  input  logic       sel,
  input  logic       we,
  input  logic [4:0] reg_sel,
  input  word_t      wdata,
  output word_t      rdata,
  output logic       ready,
  // keyboard side
  input  logic       key_valid,
  input  logic [7:0] key_char,
  // interrupt request
  output logic       irq,
  output logic [2:0] irq_pl
);

  logic       kb_ready;
  logic       kb_ie;
  logic [7:0] kb_data;
  logic       access;

  assign access = sel && !ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      kb_ready <= 1'b0;
      kb_ie    <= 1'b0;
      kb_data  <= '0;
      ready    <= 1'b0;
      rdata    <= '0;
    end else begin
      ready <= access;
      if (access && we && reg_sel == KBSR_OFS) kb_ie <= wdata[14];
      if (access && !we) begin
        unique case (reg_sel)
          KBSR_OFS: rdata <= {kb_ready, kb_ie, 14'd0};
          KBDR_OFS: rdata <= {8'd0, kb_data};
          default:  rdata <= '0;
        endcase
      end
      if (key_valid) begin
        kb_data  <= key_char;
        kb_ready <= 1'b1;
      end else if (access && !we && reg_sel == KBDR_OFS) begin
        kb_ready <= 1'b0;
      end
    end
  end

  assign irq    = kb_ready && kb_ie;
  assign irq_pl = PRIORITY;

endmodule
