// tb_audio_ref_pkg: reference model of the audio effect chain for the
// testbenches, written with plain integer arithmetic. Effects are applied in
// the order high pass, low pass, distortion, echo, each only if its bit in
// the active mask is set (bit 0 = high pass). State persists between calls,
// like the context the objects save and restore.
package tb_audio_ref_pkg;

  class audio_ref;
    int hp[2], lp[2];
    int hist[2][$];
    int delay;

    function new(int d);
      delay = d;
      hp = '{0, 0};
      lp = '{0, 0};
    endfunction

    static function int sat(int v);
      return v > 32767 ? 32767 : (v < -32768 ? -32768 : v);
    endfunction
    static function int asr(int v, int n);
      return (v >= 0) ? v / (1 << n) : -((-v + (1 << n) - 1) / (1 << n));
    endfunction

    // one stereo sample through the chain
    function logic [31:0] run(logic [31:0] s, logic [3:0] act);
      int x[2];
      x[0] = int'($signed(s[31:16]));
      x[1] = int'($signed(s[15:0]));
      for (int c = 0; c < 2; c++) begin
        if (act[0]) begin
          hp[c] = hp[c] + asr(x[c] - hp[c], 3);
          x[c]  = sat(x[c] - hp[c]);
        end
        if (act[1]) begin
          lp[c] = lp[c] + asr(x[c] - lp[c], 3);
          x[c]  = lp[c];
        end
        if (act[2]) begin
          int g = x[c] * 4;
          x[c] = g > 12000 ? 12000 : (g < -12000 ? -12000 : g);
        end
        if (act[3]) begin
          int old = (hist[c].size() == delay) ? hist[c][0] : 0;
          hist[c].push_back(x[c]);
          if (hist[c].size() > delay) void'(hist[c].pop_front());
          x[c] = sat(x[c] + asr(old, 1));
        end
      end
      return {16'(x[0]), 16'(x[1])};
    endfunction
  endclass

endpackage
