// clock_ref_pkg: reference arithmetic shared by the clock testbenches.
// Time of day is held as seconds since midnight (0..86399); these functions
// give the 12-hour fields and the text the LCD is expected to show.
package clock_ref_pkg;

  function automatic int unsigned h24_of(int unsigned t);
    return t / 3600;
  endfunction

  function automatic int unsigned h12_of(int unsigned t);
    int unsigned h;
    h = (t / 3600) % 12;
    return (h == 0) ? 12 : h;
  endfunction

  function automatic int unsigned min_of(int unsigned t);
    return (t / 60) % 60;
  endfunction

  function automatic int unsigned sec_of(int unsigned t);
    return t % 60;
  endfunction

  function automatic bit pm_of(int unsigned t);
    return (t / 3600) >= 12;
  endfunction

  // "hh:mm:ss am" / "hh:mm:ss pm"
  function automatic string text_of(int unsigned t);
    return $sformatf("%02d:%02d:%02d %s", h12_of(t), min_of(t), sec_of(t), pm_of(t) ? "pm" : "am");
  endfunction

  // time after one set-mode half-second step
  function automatic int unsigned set_step(int unsigned t, bit mn, bit hr);
    int unsigned h, m;
    h = t / 3600; m = (t / 60) % 60;
    if (mn) m = (m + 1) % 60;
    if (hr) h = (h + 1) % 24;
    return h * 3600 + m * 60 + t % 60;
  endfunction

  // 8-bit BCD of a value 0..99
  function automatic logic [7:0] bcd8(int unsigned v);
    return {4'(v / 10), 4'(v % 10)};
  endfunction

endpackage
